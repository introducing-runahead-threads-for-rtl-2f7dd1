// tb_preg_pool: self-checking test of the shared physical register pool.
//
// Checks the reset state (192 of 320 registers free with 4 threads of 32
// architectural registers), that a group gets the lowest free registers in
// lane order, that a group asking for more registers than are free gets
// none (all-or-nothing stall), that registers freed in a cycle are usable
// in the next, that a held group takes nothing, and the per-thread occupancy counts. Then 4000 random cycles
// of allocation and release (a thread only frees registers it holds)
// against a reference model of the free set and the counts.
module tb_preg_pool;
  localparam int T = 4, N = 320, NA = 32, W = 8, TW = 2, PRW = 9, CNW = 9;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] areq;
  logic [TW-1:0] atid;
  logic aok, afit, ahold;
  logic [W-1:0][PRW-1:0] apreg;
  logic [W-1:0] fvalid;
  logic [W-1:0][TW-1:0] ftid;
  logic [W-1:0][PRW-1:0] fpreg;
  logic [CNW-1:0] nfree;
  logic [T-1:0][CNW-1:0] used;

  int checks = 0, failures = 0;
  bit ref_free [N];
  int ref_used [T];
  int held [T][$];   // registers each thread holds, in allocation order

  preg_pool #(.THREADS(T), .NPREG(N), .NAREG(NA), .WIDTH(W)) dut (
    .clk, .rst_n, .alloc_req_i(areq), .alloc_tid_i(atid), .alloc_hold_i(ahold),
    .alloc_fit_o(afit), .alloc_ok_o(aok),
    .alloc_preg_o(apreg), .free_valid_i(fvalid), .free_tid_i(ftid), .free_preg_i(fpreg),
    .free_count_o(nfree), .used_o(used));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic int ref_nfree();
    int n = 0;
    for (int r = 0; r < N; r++) n += ref_free[r];
    return n;
  endfunction

  // check the current cycle's allocation against the reference, then clock
  task automatic step(string tag);
    int nreq = $countones(areq);
    bit fit = nreq <= ref_nfree();
    bit ok = fit && !ahold;
    bit taken [N];
    #1;
    chk(afit == fit, $sformatf("%s: alloc_fit", tag));
    chk(aok == ok, $sformatf("%s: alloc_ok %0d want %0d", tag, aok, ok));
    if (ok) begin
      for (int r = 0; r < N; r++) taken[r] = 0;
      for (int l = 0; l < W; l++)
        if (areq[l]) begin
          int want = -1;
          for (int r = 0; r < N && want < 0; r++) if (ref_free[r] && !taken[r]) want = r;
          chk(int'(apreg[l]) == want, $sformatf("%s: lane %0d got p%0d want p%0d", tag, l, apreg[l], want));
          taken[want] = 1;
          held[atid].push_back(want);
          ref_used[atid]++;
        end
      for (int r = 0; r < N; r++) if (taken[r]) ref_free[r] = 0;
    end
    for (int l = 0; l < W; l++)
      if (fvalid[l]) begin ref_free[fpreg[l]] = 1; ref_used[ftid[l]]--; end
    @(posedge clk); #1;
    chk(int'(nfree) == ref_nfree(), $sformatf("%s: free count %0d want %0d", tag, nfree, ref_nfree()));
    for (int t = 0; t < T; t++)
      chk(int'(used[t]) == ref_used[t], $sformatf("%s: used[%0d]", tag, t));
  endtask

  // pick up to k registers held by thread t to free this cycle
  task automatic plan_free(int t, int k);
    for (int l = 0; l < W; l++) begin
      if (k > 0 && held[t].size() > 0) begin
        int i = $urandom_range(0, held[t].size() - 1);
        fvalid[l] = 1; ftid[l] = TW'(t); fpreg[l] = PRW'(held[t][i]);
        held[t].delete(i);
        k--;
      end
    end
  endtask

  initial begin
    areq = '0; atid = '0; ahold = 0; fvalid = '0; ftid = '0; fpreg = '0;
    for (int r = 0; r < N; r++) ref_free[r] = (r >= T * NA);
    for (int t = 0; t < T; t++) begin
      ref_used[t] = NA;
      for (int a = 0; a < NA; a++) held[t].push_back(t * NA + a);
    end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    #1;
    chk(int'(nfree) == 192, "192 rename registers free after reset");
    for (int t = 0; t < T; t++) chk(int'(used[t]) == NA, "each thread holds its 32 architectural registers");

    // first group of thread 0 gets p128..p135
    areq = 8'hFF; atid = 0; #1;
    for (int l = 0; l < W; l++) chk(int'(apreg[l]) == 128 + l, "lowest free registers in lane order");
    step("first group");
    // sparse request: lanes 1 and 5
    areq = 8'b0010_0010; atid = 1; #1;
    chk(int'(apreg[1]) == 136 && int'(apreg[5]) == 137, "sparse lanes take consecutive registers");
    step("sparse");
    areq = '0;
    // drain the pool with thread 2
    while (ref_nfree() >= W) begin areq = 8'hFF; atid = 2; step("drain"); end
    chk(ref_nfree() < W, "pool nearly empty");
    // a full group no longer fits: nothing is allocated
    areq = 8'hFF; atid = 3; step("stall");
    chk(!aok || ref_nfree() >= W, "group stalls when the pool is short");
    // thread 2 frees 8 registers; the same group fits in the next cycle
    areq = '0; fvalid = '0; plan_free(2, 8); step("free");
    fvalid = '0;
    areq = 8'hFF; atid = 3; #1; chk(aok == 1, "freed registers usable next cycle");
    ahold = 1; step("held group"); ahold = 0;
    #1; chk(aok == 1, "held group allocated nothing");
    step("after free");
    areq = '0;

    // random traffic
    for (int c = 0; c < 4000; c++) begin
      fvalid = '0;
      areq   = W'($urandom);
      atid   = TW'($urandom_range(0, T - 1));
      ahold  = ($urandom_range(0, 7) == 0);
      plan_free($urandom_range(0, T - 1), $urandom_range(0, W));
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
