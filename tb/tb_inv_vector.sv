// tb_inv_vector: self-checking test of the per-thread INV bit vectors.
//
// First a directed chain: a blocking load's destination is invalidated, a
// dependent instruction issued one cycle later is reported invalid and
// passes the mark to its own destination, an independent instruction stays
// valid, the same register number in another thread is unaffected, a valid
// writeback clears a mark, and leaving runahead clears the whole thread.
// Then 3000 cycles of random traffic on all ports are compared, bit for bit
// and lane for lane, with a reference model kept in the testbench.
module tb_inv_vector;
  localparam int T = 4, N = 320, L = 8, S = 2, NS = 2;
  localparam int TW = 2, PRW = 9;

  logic clk = 0, rst_n = 0;
  logic [L-1:0]          iss_valid;
  logic [L-1:0][TW-1:0]  iss_tid;
  logic [L-1:0][S-1:0]   iss_src_used;
  logic [L-1:0][S-1:0][PRW-1:0] iss_src;
  logic [L-1:0]          iss_force;
  logic [L-1:0]          iss_dest_valid;
  logic [L-1:0][PRW-1:0] iss_dest;
  logic [L-1:0]          iss_inv;
  logic [L-1:0]          wb_valid;
  logic [L-1:0][TW-1:0]  wb_tid;
  logic [L-1:0][PRW-1:0] wb_dest;
  logic [NS-1:0]         set_valid;
  logic [NS-1:0][TW-1:0] set_tid;
  logic [NS-1:0][PRW-1:0] set_preg;
  logic [T-1:0]          clr;
  logic [T-1:0][N-1:0]   inv;

  bit ref_inv [T][N];
  int checks = 0, failures = 0;

  inv_vector #(.THREADS(T), .NPREG(N), .LANES(L), .NSRC(S), .NSET(NS)) dut (
    .clk, .rst_n,
    .iss_valid_i(iss_valid), .iss_tid_i(iss_tid), .iss_src_used_i(iss_src_used),
    .iss_src_i(iss_src), .iss_force_inv_i(iss_force), .iss_dest_valid_i(iss_dest_valid),
    .iss_dest_i(iss_dest), .iss_inv_o(iss_inv),
    .wb_valid_i(wb_valid), .wb_tid_i(wb_tid), .wb_dest_i(wb_dest),
    .set_valid_i(set_valid), .set_tid_i(set_tid), .set_preg_i(set_preg),
    .clr_thread_i(clr), .inv_o(inv));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic idle();
    iss_valid = '0; iss_tid = '0; iss_src_used = '0; iss_src = '0; iss_force = '0;
    iss_dest_valid = '0; iss_dest = '0; wb_valid = '0; wb_tid = '0; wb_dest = '0;
    set_valid = '0; set_tid = '0; set_preg = '0; clr = '0;
  endtask

  // reference: expected lane result and next state, same cycle inputs
  function automatic bit ref_lane(int l);
    bit r = iss_force[l];
    for (int s = 0; s < S; s++)
      if (iss_src_used[l][s] && int'(iss_src[l][s]) < N) r |= ref_inv[iss_tid[l]][iss_src[l][s]];
    return r;
  endfunction

  task automatic ref_step();
    bit lane_inv [L];
    for (int l = 0; l < L; l++) lane_inv[l] = ref_lane(l);
    for (int l = 0; l < L; l++)
      if (wb_valid[l]) ref_inv[wb_tid[l]][wb_dest[l]] = 0;
    for (int l = 0; l < L; l++)
      if (iss_valid[l] && iss_dest_valid[l] && lane_inv[l]) ref_inv[iss_tid[l]][iss_dest[l]] = 1;
    for (int p = 0; p < NS; p++)
      if (set_valid[p]) ref_inv[set_tid[p]][set_preg[p]] = 1;
    for (int t = 0; t < T; t++)
      if (clr[t]) for (int r = 0; r < N; r++) ref_inv[t][r] = 0;
  endtask

  task automatic compare_state(string tag);
    int bad = 0;
    for (int t = 0; t < T; t++)
      for (int r = 0; r < N; r++)
        if (inv[t][r] != ref_inv[t][r]) bad++;
    chk(bad == 0, $sformatf("%s: %0d INV bits differ", tag, bad));
  endtask

  initial begin
    idle();
    for (int t = 0; t < T; t++) for (int r = 0; r < N; r++) ref_inv[t][r] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    compare_state("after reset");

    // --- directed chain in thread 1 ---
    set_valid[0] = 1; set_tid[0] = 1; set_preg[0] = 10;        // blocking load -> p10
    @(posedge clk); #1; idle();
    chk(inv[1][10] == 1, "blocking load destination marked");
    chk(inv[0][10] == 0, "other thread's p10 unaffected");
    // lane 0: add p20 <- p10, p5 (dependent); lane 1: add p21 <- p5 (independent)
    iss_valid[0] = 1; iss_tid[0] = 1; iss_src_used[0] = 2'b11; iss_src[0][0] = 10;
    iss_src[0][1] = 5; iss_dest_valid[0] = 1; iss_dest[0] = 20;
    iss_valid[1] = 1; iss_tid[1] = 1; iss_src_used[1] = 2'b01; iss_src[1][0] = 5;
    iss_dest_valid[1] = 1; iss_dest[1] = 21;
    // lane 2: thread 0 reading its own p10 (valid)
    iss_valid[2] = 1; iss_tid[2] = 0; iss_src_used[2] = 2'b01; iss_src[2][0] = 10;
    iss_dest_valid[2] = 1; iss_dest[2] = 22;
    #1;
    chk(iss_inv[0] == 1, "dependent instruction invalid");
    chk(iss_inv[1] == 0, "independent instruction valid");
    chk(iss_inv[2] == 0, "other thread instruction valid");
    @(posedge clk); #1; idle();
    chk(inv[1][20] == 1 && inv[1][21] == 0 && inv[0][22] == 0, "destination marks after issue");
    // second level: p30 <- p20 (source in second slot, first slot unused)
    iss_valid[3] = 1; iss_tid[3] = 1; iss_src_used[3] = 2'b10; iss_src[3][0] = 10;
    iss_src[3][1] = 20; iss_dest_valid[3] = 1; iss_dest[3] = 30;
    #1; chk(iss_inv[3] == 1, "invalidity propagates through second source");
    iss_src_used[3] = 2'b00; #1;
    chk(iss_inv[3] == 0, "unused sources ignored");
    iss_src_used[3] = 2'b10;
    @(posedge clk); #1; idle();
    chk(inv[1][30] == 1, "second-level destination marked");
    // p20 is reallocated and written with a valid result
    wb_valid[4] = 1; wb_tid[4] = 1; wb_dest[4] = 20;
    @(posedge clk); #1; idle();
    chk(inv[1][20] == 0 && inv[1][30] == 1, "valid writeback clears only its register");
    // set and writeback of the same bit in one cycle: the set wins
    wb_valid[0] = 1; wb_tid[0] = 2; wb_dest[0] = 99;
    set_valid[1] = 1; set_tid[1] = 2; set_preg[1] = 99;
    @(posedge clk); #1; idle();
    chk(inv[2][99] == 1, "set wins over writeback");
    // leaving runahead clears thread 1 but not thread 2
    clr[1] = 1;
    @(posedge clk); #1; idle();
    chk(inv[1] == '0, "thread vector cleared on exit");
    chk(inv[2][99] == 1, "other thread kept");
    clr[2] = 1;
    @(posedge clk); #1; idle();
    for (int t = 0; t < T; t++) for (int r = 0; r < N; r++) ref_inv[t][r] = 0;
    compare_state("after directed part");

    // --- random traffic against the reference ---
    for (int cyc = 0; cyc < 3000; cyc++) begin
      for (int l = 0; l < L; l++) begin
        iss_valid[l]      = ($urandom_range(0, 3) != 0);
        iss_tid[l]        = TW'($urandom_range(0, T - 1));
        iss_src_used[l]   = S'($urandom);
        for (int s = 0; s < S; s++) iss_src[l][s] = PRW'($urandom_range(0, 39));
        iss_force[l]      = ($urandom_range(0, 15) == 0);
        iss_dest_valid[l] = ($urandom_range(0, 4) != 0);
        iss_dest[l]       = PRW'($urandom_range(0, 39));
        wb_valid[l]       = ($urandom_range(0, 2) == 0);
        wb_tid[l]         = TW'($urandom_range(0, T - 1));
        wb_dest[l]        = PRW'($urandom_range(0, 39));
      end
      for (int p = 0; p < NS; p++) begin
        set_valid[p] = ($urandom_range(0, 5) == 0);
        set_tid[p]   = TW'($urandom_range(0, T - 1));
        set_preg[p]  = PRW'($urandom_range(0, N - 1));
      end
      clr = ($urandom_range(0, 40) == 0) ? T'($urandom) : '0;
      #1;
      for (int l = 0; l < L; l++)
        chk(iss_inv[l] == ref_lane(l), $sformatf("random lane %0d cycle %0d", l, cyc));
      ref_step();
      @(posedge clk); #1;
      if (cyc % 100 == 99) compare_state($sformatf("random cycle %0d", cyc));
    end
    idle();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
