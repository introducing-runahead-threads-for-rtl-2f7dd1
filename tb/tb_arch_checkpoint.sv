// tb_arch_checkpoint: self-checking test of the per-thread architectural checkpoint.
//
// Fills every architectural register of every thread through the commit
// lanes, then commits random traffic while thread 2 is frozen (running
// ahead): its commits must be ignored, the others must land, with the later
// lane winning when two lanes of one cycle write the same register. Two
// threads then request a restore in the same cycle; the stream is checked
// beat by beat against a reference copy kept in the testbench, including
// the thread order, the register numbering, the done pulses and the
// 2*NAREG/RLANES-cycle restore time per thread.
module tb_arch_checkpoint;
  localparam int T = 4, NA = 32, X = 64, W = 8, R = 8;
  localparam int TW = 2, AW = 6, NENT = 2 * NA, NBEAT = NENT / R;

  logic clk = 0, rst_n = 0;
  logic [W-1:0]          cm_valid;
  logic [W-1:0][TW-1:0]  cm_tid;
  logic [W-1:0][AW-1:0]  cm_areg;
  logic [W-1:0][X-1:0]   cm_data;
  logic [T-1:0]          freeze;
  logic [T-1:0]          rstart;
  logic                  rs_valid;
  logic [TW-1:0]         rs_tid;
  logic [R-1:0][AW-1:0]  rs_areg;
  logic [R-1:0][X-1:0]   rs_data;
  logic [T-1:0]          rdone;

  logic [X-1:0] ref_regs [T][NENT];
  int checks = 0, failures = 0;

  arch_checkpoint #(.THREADS(T), .NAREG(NA), .XLEN(X), .WIDTH(W), .RLANES(R)) dut (
    .clk, .rst_n,
    .cm_valid_i(cm_valid), .cm_tid_i(cm_tid), .cm_areg_i(cm_areg), .cm_data_i(cm_data),
    .freeze_i(freeze), .restore_start_i(rstart),
    .rs_valid_o(rs_valid), .rs_tid_o(rs_tid), .rs_areg_o(rs_areg), .rs_data_o(rs_data),
    .restore_done_o(rdone));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic logic [X-1:0] rnd64();
    return {$urandom, $urandom};
  endfunction

  // Expect one full restore of thread t, starting at the current cycle.
  task automatic expect_restore(int t);
    for (int b = 0; b < NBEAT; b++) begin
      #1;
      chk(rs_valid == 1 && rs_tid == TW'(t), $sformatf("restore beat %0d of thread %0d", b, t));
      for (int r = 0; r < R; r++) begin
        chk(rs_areg[r] == AW'(b * R + r), "restore register number");
        chk(rs_data[r] == ref_regs[t][b * R + r],
            $sformatf("restored value t%0d a%0d", t, b * R + r));
      end
      chk(rdone == ((b == NBEAT - 1) ? T'(1 << t) : '0), "done pulse only on last beat");
      @(posedge clk);
    end
  endtask

  initial begin
    cm_valid = '0; cm_tid = '0; cm_areg = '0; cm_data = '0; freeze = '0; rstart = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    chk(rs_valid == 0 && rdone == 0, "idle after reset");

    // fill all registers, 8 per cycle
    for (int t = 0; t < T; t++)
      for (int b = 0; b < NBEAT; b++) begin
        for (int l = 0; l < W; l++) begin
          cm_valid[l] = 1; cm_tid[l] = TW'(t); cm_areg[l] = AW'(b * W + l);
          cm_data[l] = rnd64();
          ref_regs[t][b * W + l] = cm_data[l];
        end
        @(posedge clk); #1;
      end
    cm_valid = '0;

    // thread 2 runs ahead: its pseudo-retirements must not reach the copy
    freeze = 4'b0100;
    for (int c = 0; c < 200; c++) begin
      for (int l = 0; l < W; l++) begin
        cm_valid[l] = ($urandom_range(0, 1) == 1);
        cm_tid[l]   = TW'($urandom_range(0, T - 1));
        cm_areg[l]  = AW'($urandom_range(0, 7));   // narrow range: same-cycle collisions
        cm_data[l]  = rnd64();
      end
      for (int l = 0; l < W; l++)
        if (cm_valid[l] && !freeze[cm_tid[l]]) ref_regs[cm_tid[l]][cm_areg[l]] = cm_data[l];
      @(posedge clk); #1;
    end
    cm_valid = '0;

    // threads 0 and 2 leave runahead together; lowest thread first
    rstart = 4'b0101;
    @(posedge clk); #1;
    rstart = '0;
    expect_restore(0);
    expect_restore(2);
    #1;
    chk(rs_valid == 0, "stream idle after both restores");

    // a single restore of thread 3, started while idle
    freeze = '0;
    rstart = 4'b1000;
    @(posedge clk); #1;
    rstart = '0;
    expect_restore(3);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
