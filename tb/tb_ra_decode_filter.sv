// tb_ra_decode_filter: self-checking test of the runahead decode filter.
//
// Directed part: a normal thread gets DA_NORMAL for every class; a
// runahead thread drops FP computation and acquire/release, keeps FP memory
// operations as address-only prefetches, and marks everything between an
// acquire and its release invalid, also across decode groups; a lock taken
// before runahead (committed acquire) makes the thread start inside the
// critical section; pseudo-retired acquires do not change the committed
// depth. Random part: 4000 cycles of random groups, modes, entries and
// commits compared with a reference model kept in the testbench.
module tb_ra_decode_filter;
  import ra_pkg::*;
  localparam int T = 4, W = 8, TW = 2;

  logic clk = 0, rst_n = 0;
  logic [T-1:0] ra_mode, ra_enter;
  logic [W-1:0] dec_valid;
  logic [TW-1:0] dec_tid;
  iclass_e [W-1:0] dec_class;
  daction_e [W-1:0] dec_action;
  logic [W-1:0] cm_valid;
  logic [W-1:0][TW-1:0] cm_tid;
  iclass_e [W-1:0] cm_class;

  int checks = 0, failures = 0;
  int ref_c [T];   // committed depth
  int ref_s [T];   // speculative depth

  ra_decode_filter #(.THREADS(T), .WIDTH(W)) dut (
    .clk, .rst_n, .ra_mode_i(ra_mode), .ra_enter_i(ra_enter),
    .dec_valid_i(dec_valid), .dec_tid_i(dec_tid), .dec_class_i(dec_class),
    .dec_action_o(dec_action),
    .cm_valid_i(cm_valid), .cm_tid_i(cm_tid), .cm_class_i(cm_class));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic idle();
    ra_enter = '0; dec_valid = '0; dec_tid = '0; cm_valid = '0; cm_tid = '0;
    for (int l = 0; l < W; l++) begin dec_class[l] = IC_NOP; cm_class[l] = IC_NOP; end
  endtask

  // Reference: expected actions of the current group and next depths.
  function automatic void ref_eval(output daction_e exp [W], output int nd);
    int d = ref_s[dec_tid];
    for (int l = 0; l < W; l++) begin
      exp[l] = DA_NORMAL;
      if (dec_valid[l] && ra_mode[dec_tid]) begin
        case (dec_class[l])
          IC_ACQUIRE: begin exp[l] = DA_DROP; if (d < 15) d++; end
          IC_RELEASE: begin exp[l] = DA_DROP; if (d > 0) d--; end
          IC_FP:      exp[l] = DA_DROP;
          IC_FP_LOAD, IC_FP_STORE: exp[l] = (d != 0) ? DA_INVALID : DA_NODEST;
          default:    exp[l] = (d != 0) ? DA_INVALID : DA_NORMAL;
        endcase
      end
    end
    nd = d;
  endfunction

  task automatic step_and_check(string tag);
    daction_e exp [W];
    int nd;
    ref_eval(exp, nd);
    #1;
    for (int l = 0; l < W; l++)
      chk(dec_action[l] == exp[l], $sformatf("%s lane %0d: got %0d want %0d", tag, l,
                                               dec_action[l], exp[l]));
    // advance the reference like the hardware
    if (ra_mode[dec_tid]) ref_s[dec_tid] = nd;
    for (int l = 0; l < W; l++)
      if (cm_valid[l] && !ra_mode[cm_tid[l]]) begin
        if (cm_class[l] == IC_ACQUIRE && ref_c[cm_tid[l]] < 15) ref_c[cm_tid[l]]++;
        if (cm_class[l] == IC_RELEASE && ref_c[cm_tid[l]] > 0)  ref_c[cm_tid[l]]--;
      end
    for (int t = 0; t < T; t++) if (ra_enter[t]) ref_s[t] = ref_c[t];
    @(posedge clk); #1;
  endtask

  task automatic group(input logic [TW-1:0] tid, input iclass_e c [W]);
    dec_tid = tid; dec_valid = '1;
    for (int l = 0; l < W; l++) dec_class[l] = c[l];
  endtask

  initial begin
    iclass_e g [W];
    idle(); ra_mode = '0;
    for (int t = 0; t < T; t++) begin ref_c[t] = 0; ref_s[t] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // normal thread: everything passes
    g = '{IC_INT, IC_FP, IC_FP_LOAD, IC_ACQUIRE, IC_INT, IC_LOAD, IC_RELEASE, IC_STORE};
    group(0, g); #1;
    for (int l = 0; l < W; l++) chk(dec_action[l] == DA_NORMAL, "normal mode passes all");
    step_and_check("normal");

    // thread 1 runs ahead (no lock held)
    ra_enter = 4'b0010; dec_valid = '0;
    step_and_check("enter1");
    ra_mode = 4'b0010; idle();
    group(1, g); #1;
    chk(dec_action[0] == DA_NORMAL,  "int before lock normal");
    chk(dec_action[1] == DA_DROP,    "FP dropped");
    chk(dec_action[2] == DA_NODEST,  "FP load address only");
    chk(dec_action[3] == DA_DROP,    "acquire ignored");
    chk(dec_action[4] == DA_INVALID, "int inside critical section invalid");
    chk(dec_action[5] == DA_INVALID, "load inside critical section invalid");
    chk(dec_action[6] == DA_DROP,    "release ignored");
    chk(dec_action[7] == DA_NORMAL,  "store after release normal");
    step_and_check("ra1");
    // acquire at the end of one group, the next group is inside
    g = '{IC_INT, IC_INT, IC_INT, IC_INT, IC_INT, IC_INT, IC_INT, IC_ACQUIRE};
    group(1, g); step_and_check("ra1 acquire last");
    g = '{IC_LOAD, IC_BRANCH, IC_RELEASE, IC_LOAD, IC_FP, IC_NOP, IC_INT, IC_INT};
    group(1, g); #1;
    chk(dec_action[0] == DA_INVALID && dec_action[1] == DA_INVALID,
        "critical section spans decode groups");
    chk(dec_action[3] == DA_NORMAL, "normal after release in next group");
    step_and_check("ra1 next group");

    // thread 2 holds a lock when it enters runahead
    idle();
    cm_valid[0] = 1; cm_tid[0] = 2; cm_class[0] = IC_ACQUIRE;
    step_and_check("commit acquire");
    idle(); ra_enter = 4'b0100;
    step_and_check("enter2");
    ra_mode = 4'b0110; idle();
    g = '{IC_INT, IC_FP_STORE, IC_RELEASE, IC_INT, IC_NOP, IC_NOP, IC_NOP, IC_NOP};
    group(2, g); #1;
    chk(dec_action[0] == DA_INVALID, "inside inherited critical section");
    chk(dec_action[1] == DA_INVALID, "FP store inside critical section invalid");
    chk(dec_action[3] == DA_NORMAL,  "after release normal");
    step_and_check("ra2");
    // pseudo-retired acquire of a runahead thread does not count
    idle();
    cm_valid[1] = 1; cm_tid[1] = 2; cm_class[1] = IC_ACQUIRE;
    step_and_check("pseudo-retired acquire");
    // leave and re-enter: committed depth must still be 1
    idle(); ra_mode = 4'b0010;
    step_and_check("exit2");
    ra_enter = 4'b0100; step_and_check("re-enter2");
    ra_mode = 4'b0110; idle();
    g = '{IC_INT, IC_NOP, IC_NOP, IC_NOP, IC_NOP, IC_NOP, IC_NOP, IC_NOP};
    group(2, g); #1;
    chk(dec_action[0] == DA_INVALID, "committed depth unchanged by pseudo-retirement");
    step_and_check("ra2 again");

    // random traffic
    for (int c = 0; c < 4000; c++) begin
      idle();
      if ($urandom_range(0, 30) == 0) ra_mode = T'($urandom);
      ra_enter = ($urandom_range(0, 20) == 0) ? (T'($urandom) & ~ra_mode) : '0;
      dec_tid = TW'($urandom_range(0, T - 1));
      for (int l = 0; l < W; l++) begin
        dec_valid[l] = ($urandom_range(0, 3) != 0);
        dec_class[l] = iclass_e'($urandom_range(0, 9));
        cm_valid[l]  = ($urandom_range(0, 3) == 0);
        cm_tid[l]    = TW'($urandom_range(0, T - 1));
        cm_class[l]  = iclass_e'($urandom_range(6, 9));
      end
      step_and_check($sformatf("random %0d", c));
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
