// tb_runahead_ctrl: self-checking test of the per-thread runahead state machine.
//
// Drives the head-of-ROB and miss-return inputs through: a load that hits
// (no entry), an L2 miss whose data returns in the same cycle (no entry), a
// full runahead episode whose miss returns after the 400-cycle memory
// latency (entry, unrelated returns ignored, exit, restore, back to normal),
// and a second episode. Expected values are written out by hand from the
// protocol; the time spent in runahead mode is counted and compared with
// the memory latency.
module tb_runahead_ctrl;
  import ra_pkg::*;

  localparam int PCW = 64, MIDW = 6, PRW = 9;
  localparam int MEM_LAT = 400;

  logic clk = 0, rst_n = 0;
  logic head_valid, head_is_load, head_l2_miss;
  logic [MIDW-1:0] head_miss_id;
  logic [PCW-1:0]  head_pc;
  logic [PRW-1:0]  head_dest;
  logic fill_valid;
  logic [MIDW-1:0] fill_id;
  logic restore_done;
  ra_state_e state;
  logic ra_mode, restore, enter, exit_p;
  logic [PRW-1:0] enter_dest;
  logic [PCW-1:0] restart_pc;

  int checks = 0, failures = 0;

  runahead_ctrl #(.PCW(PCW), .MIDW(MIDW), .PRW(PRW)) dut (
    .clk, .rst_n,
    .head_valid_i(head_valid), .head_is_load_i(head_is_load), .head_l2_miss_i(head_l2_miss),
    .head_miss_id_i(head_miss_id), .head_pc_i(head_pc), .head_dest_i(head_dest),
    .fill_valid_i(fill_valid), .fill_id_i(fill_id), .restore_done_i(restore_done),
    .state_o(state), .ra_mode_o(ra_mode), .restore_o(restore), .enter_o(enter),
    .enter_dest_o(enter_dest), .exit_o(exit_p), .restart_pc_o(restart_pc));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic idle();
    head_valid = 0; head_is_load = 0; head_l2_miss = 0;
    head_miss_id = 0; head_pc = 0; head_dest = 0;
    fill_valid = 0; fill_id = 0; restore_done = 0;
  endtask

  // One complete episode; returns the number of cycles spent in RUNAHEAD.
  task automatic episode(input logic [MIDW-1:0] id, input logic [PCW-1:0] pc,
                         input logic [PRW-1:0] dst, output int ra_cycles);
    ra_cycles = 0;
    head_valid = 1; head_is_load = 1; head_l2_miss = 1;
    head_miss_id = id; head_pc = pc; head_dest = dst;
    #1;
    chk(enter == 1, "enter pulse on L2-missing load at head");
    chk(enter_dest == dst, "enter_dest is the load destination");
    chk(ra_mode == 0, "not yet in runahead in entry cycle");
    @(posedge clk); #1;
    chk(ra_mode == 1 && state == RS_RUNAHEAD, "runahead mode after entry");
    chk(restart_pc == pc, "restart PC captured");
    // younger instructions now reach the head; the head changes
    head_miss_id = id + 1; head_pc = pc + 4; head_dest = dst + 1;
    #1;
    chk(enter == 0, "no re-entry while in runahead");
    for (int c = 1; c < MEM_LAT; c++) begin
      if (ra_mode) ra_cycles++;
      // an unrelated miss returns in the middle
      if (c == 100) begin fill_valid = 1; fill_id = id + 3; end
      else          begin fill_valid = 0; end
      #1;
      if (c == 100) chk(exit_p == 0, "unrelated miss return ignored");
      @(posedge clk); #1;
    end
    fill_valid = 1; fill_id = id;
    #1;
    if (ra_mode) ra_cycles++;
    chk(exit_p == 1, "exit pulse when blocking miss returns");
    @(posedge clk); #1;
    fill_valid = 0;
    chk(restore == 1 && ra_mode == 0, "restore state after exit");
    chk(restart_pc == pc, "restart PC held during restore");
    head_valid = 0;
    repeat (3) @(posedge clk);
    #1;
    chk(restore == 1, "restore held until done");
    restore_done = 1;
    @(posedge clk); #1;
    restore_done = 0;
    chk(state == RS_NORMAL && !ra_mode && !restore, "back to normal after restore");
  endtask

  initial begin
    int n;
    idle();
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    chk(state == RS_NORMAL, "reset state NORMAL");

    // load that hits: nothing happens
    head_valid = 1; head_is_load = 1; head_l2_miss = 0; head_miss_id = 7;
    #1; chk(enter == 0, "no entry on L2 hit");
    // non-load with miss flag: nothing happens
    head_is_load = 0; head_l2_miss = 1;
    #1; chk(enter == 0, "no entry for non-load");
    // miss returning this very cycle: nothing happens
    head_is_load = 1; fill_valid = 1; fill_id = 7;
    #1; chk(enter == 0, "no entry when data returns same cycle");
    @(posedge clk); #1;
    chk(state == RS_NORMAL, "still normal");
    idle();
    @(posedge clk); #1;

    episode(6'd9, 64'h0000_1234_5678_0040, 9'd300, n);
    chk(n == MEM_LAT, $sformatf("runahead lasted %0d cycles, expected %0d", n, MEM_LAT));
    @(posedge clk); #1;
    episode(6'd33, 64'hFFFF_0000_0000_1000, 9'd17, n);
    chk(n == MEM_LAT, "second episode length");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
