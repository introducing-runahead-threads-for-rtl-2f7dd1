// tb_icount_fetch: self-checking test of the ICOUNT fetch selector.
//
// Directed part: counts are built up per thread and the thread with the
// fewest instructions must be granted; equal counts rotate round robin;
// stalled and inactive threads are skipped; a flush clears a count; the
// counter saturates at zero. Random part: 5000 cycles of random fetches,
// departures, stalls and flushes against a reference model of the counters
// and of the selection rule kept in the testbench.
module tb_icount_fetch;
  localparam int T = 4, W = 8, CW = 10, TW = 2, NW = 4;

  logic clk = 0, rst_n = 0;
  logic [T-1:0] active, stall, flush;
  logic inc_valid;
  logic [TW-1:0] inc_tid;
  logic [NW-1:0] inc_n;
  logic [T-1:0][NW-1:0] dec_n;
  logic gv;
  logic [TW-1:0] gt;
  logic [T-1:0][CW-1:0] cnt;

  int checks = 0, failures = 0;
  int rc [T];
  int rlast;

  icount_fetch #(.THREADS(T), .WIDTH(W), .CW(CW)) dut (
    .clk, .rst_n, .active_i(active), .stall_i(stall),
    .inc_valid_i(inc_valid), .inc_tid_i(inc_tid), .inc_n_i(inc_n),
    .dec_n_i(dec_n), .flush_i(flush),
    .grant_valid_o(gv), .grant_tid_o(gt), .count_o(cnt));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic idle();
    stall = '0; flush = '0; inc_valid = 0; inc_tid = '0; inc_n = '0; dec_n = '0;
  endtask

  // reference selection: smallest count, ties to the first after rlast
  function automatic int ref_pick();
    int best = -1;
    for (int k = 1; k <= T; k++) begin
      int t = (rlast + k) % T;
      if (active[t] && !stall[t] && (best < 0 || rc[t] < rc[best])) best = t;
    end
    return best;
  endfunction

  task automatic step(string tag);
    int p;
    p = ref_pick();
    #1;
    chk(gv == (p >= 0), $sformatf("%s: grant valid", tag));
    if (p >= 0) chk(gt == TW'(p), $sformatf("%s: granted %0d, want %0d", tag, gt, p));
    for (int t = 0; t < T; t++) begin
      if (inc_valid && inc_tid == TW'(t)) rc[t] += int'(inc_n);
      rc[t] = (rc[t] > int'(dec_n[t])) ? rc[t] - int'(dec_n[t]) : 0;
      if (rc[t] > 1023) rc[t] = 1023;
      if (flush[t]) rc[t] = 0;
    end
    if (p >= 0) rlast = p;
    @(posedge clk); #1;
    for (int t = 0; t < T; t++)
      chk(cnt[t] == CW'(rc[t]), $sformatf("%s: count %0d", tag, t));
  endtask

  initial begin
    idle(); active = '1;
    for (int t = 0; t < T; t++) rc[t] = 0;
    rlast = T - 1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // all zero: round robin 0,1,2,3
    for (int i = 0; i < T; i++) begin
      #1; chk(gv && gt == TW'(i), "equal counts rotate");
      step("rr");
    end
    // build counts 5,3,3,7
    inc_valid = 1;
    inc_tid = 0; inc_n = 5; step("inc0");
    inc_tid = 1; inc_n = 3; step("inc1");
    inc_tid = 2; inc_n = 3; step("inc2");
    inc_tid = 3; inc_n = 7; step("inc3");
    idle();
    #1; chk(gt == 1 || gt == 2, "fewest instructions wins");
    step("pick min");
    step("pick min again");
    // thread 1 and 2 stalled: thread 0 (5) beats 3 (7)
    stall = 4'b0110; #1; chk(gt == 0, "stalled threads skipped");
    step("stall");
    // thread 0 inactive too
    active = 4'b1000; #1; chk(gt == 3, "inactive threads skipped");
    step("inactive");
    active = '1; idle();
    // instructions leave thread 3 (runahead thread drains fast): 7 -> 0
    dec_n[3] = 8; step("drain");
    #1; chk(gt == 3, "drained thread preferred");
    // flush thread 0 while it also gets instructions: flush wins
    inc_valid = 1; inc_tid = 0; inc_n = 4; flush = 4'b0001; step("flush");
    idle();
    chk(cnt[0] == 0, "flush clears count");

    // random
    for (int c = 0; c < 5000; c++) begin
      active    = ($urandom_range(0, 50) == 0) ? T'($urandom) : active;
      stall     = ($urandom_range(0, 3) == 0) ? T'($urandom) : '0;
      inc_valid = gv && ($urandom_range(0, 4) != 0);
      inc_tid   = gt;
      inc_n     = NW'($urandom_range(0, W));
      for (int t = 0; t < T; t++) dec_n[t] = NW'($urandom_range(0, W - 2));
      flush     = ($urandom_range(0, 60) == 0) ? T'($urandom) : '0;
      #0;
      step($sformatf("random %0d", c));
    end

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
