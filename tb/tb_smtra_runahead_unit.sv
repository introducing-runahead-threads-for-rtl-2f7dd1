// tb_smtra_runahead_unit: end-to-end test of the runahead-thread unit at its
// default size (4 threads, 8 wide, 320 physical registers).
//
// The testbench stands in for the SMT core and the memory system. Memory
// returns an L2 miss 400 cycles after it was issued. The fetch model feeds
// the ICOUNT counters: each grant fetches 8 instructions, a normal thread
// drains 2 per cycle from its queues and a runahead thread drains 8 (its
// invalid and dropped instructions leave at once). The scenario:
//   1. all threads commit values into every architectural register; the
//      shared register pools start with 192 free rename registers, serve
//      rename groups, stall a group when the INT pool runs short (taking
//      nothing from the FP pool either) and serve it once registers are
//      released;
//   2. thread 1's oldest instruction is a load that misses in L2: it enters
//      runahead, its load destination becomes INV, a dependent instruction
//      issues as invalid and passes the mark on, an independent one stays
//      valid, FP work and acquire/release are dropped at decode, a critical
//      section is invalidated, an FP load becomes address-only, a second L2
//      miss in runahead invalidates its load; its pseudo-retirements carry
//      junk values; thread 0 keeps committing normally meanwhile;
//   3. threads 2 and 3 enter runahead together (several runahead threads);
//   4. the blocking misses return; each thread exits, its INV vector
//      clears, it is not fetched while its checkpoint streams back, and the
//      restored values must be the committed ones, not the junk.
// Each mechanism is counted and a failure is counted for any that never
// happened.
module tb_smtra_runahead_unit;
  import ra_pkg::*;

  localparam int T = 4, W = 8, NP = 320, NA = 32, X = 64, PCW = 64, MIDW = 6, CW = 10;
  localparam int TW = 2, PRW = 9, AW = 6, NW = 4, NENT = 2 * NA;
  localparam int MEM_LAT = 400;

  logic clk = 0, rst_n = 0;
  logic [T-1:0] thread_active, fetch_stall;
  logic fetched_valid;
  logic [TW-1:0] fetched_tid;
  logic [NW-1:0] fetched_n;
  logic [T-1:0][NW-1:0] left_n;
  logic fgv;
  logic [TW-1:0] fgt;
  logic [T-1:0][CW-1:0] icount;
  logic [T-1:0] head_valid, head_is_load, head_l2_miss;
  logic [T-1:0][MIDW-1:0] head_miss_id;
  logic [T-1:0][PCW-1:0] head_pc;
  logic [T-1:0][PRW-1:0] head_dest;
  logic fill_valid;
  logic [MIDW-1:0] fill_id;
  logic ra_miss_valid;
  logic [TW-1:0] ra_miss_tid;
  logic [PRW-1:0] ra_miss_dest;
  logic [W-1:0] dec_valid;
  logic [TW-1:0] dec_tid;
  iclass_e [W-1:0] dec_class;
  daction_e [W-1:0] dec_action;
  logic [W-1:0] iss_valid;
  logic [W-1:0][TW-1:0] iss_tid;
  logic [W-1:0][1:0] iss_src_used;
  logic [W-1:0][1:0][PRW-1:0] iss_src;
  logic [W-1:0] iss_force, iss_dest_valid;
  logic [W-1:0][PRW-1:0] iss_dest;
  logic [W-1:0] iss_inv;
  localparam int CNW = 9;
  logic [W-1:0] ren_int_req, ren_fp_req;
  logic [TW-1:0] ren_tid;
  logic ren_ok;
  logic [W-1:0][PRW-1:0] ren_int_preg, ren_fp_preg;
  logic [W-1:0] rel_int_valid, rel_fp_valid;
  logic [W-1:0][TW-1:0] rel_int_tid, rel_fp_tid;
  logic [W-1:0][PRW-1:0] rel_int_preg, rel_fp_preg;
  logic [CNW-1:0] int_free, fp_free;
  logic [T-1:0][CNW-1:0] int_used, fp_used;
  logic [W-1:0] wb_valid;
  logic [W-1:0][TW-1:0] wb_tid;
  logic [W-1:0][PRW-1:0] wb_dest;
  logic [W-1:0] cm_valid;
  logic [W-1:0][TW-1:0] cm_tid;
  iclass_e [W-1:0] cm_class;
  logic [W-1:0] cm_dest_valid;
  logic [W-1:0][AW-1:0] cm_areg;
  logic [W-1:0][X-1:0] cm_data;
  ra_state_e [T-1:0] ra_state;
  logic [T-1:0] ra_mode, restoring, enter, exit_p;
  logic [T-1:0][PCW-1:0] restart_pc;
  logic rs_valid;
  logic [TW-1:0] rs_tid;
  logic [W-1:0][AW-1:0] rs_areg;
  logic [W-1:0][X-1:0] rs_data;
  logic [T-1:0][NP-1:0] inv;

  smtra_runahead_unit dut (
    .clk, .rst_n,
    .thread_active_i(thread_active), .fetch_stall_i(fetch_stall),
    .fetched_valid_i(fetched_valid), .fetched_tid_i(fetched_tid), .fetched_n_i(fetched_n),
    .left_n_i(left_n), .fetch_grant_valid_o(fgv), .fetch_grant_tid_o(fgt), .icount_o(icount),
    .head_valid_i(head_valid), .head_is_load_i(head_is_load), .head_l2_miss_i(head_l2_miss),
    .head_miss_id_i(head_miss_id), .head_pc_i(head_pc), .head_dest_i(head_dest),
    .fill_valid_i(fill_valid), .fill_id_i(fill_id),
    .ra_miss_valid_i(ra_miss_valid), .ra_miss_tid_i(ra_miss_tid), .ra_miss_dest_i(ra_miss_dest),
    .dec_valid_i(dec_valid), .dec_tid_i(dec_tid), .dec_class_i(dec_class),
    .dec_action_o(dec_action),
    .iss_valid_i(iss_valid), .iss_tid_i(iss_tid), .iss_src_used_i(iss_src_used),
    .iss_src_i(iss_src), .iss_force_inv_i(iss_force), .iss_dest_valid_i(iss_dest_valid),
    .iss_dest_i(iss_dest), .iss_inv_o(iss_inv),
    .ren_int_req_i(ren_int_req), .ren_fp_req_i(ren_fp_req), .ren_tid_i(ren_tid),
    .ren_ok_o(ren_ok), .ren_int_preg_o(ren_int_preg), .ren_fp_preg_o(ren_fp_preg),
    .rel_int_valid_i(rel_int_valid), .rel_int_tid_i(rel_int_tid), .rel_int_preg_i(rel_int_preg),
    .rel_fp_valid_i(rel_fp_valid), .rel_fp_tid_i(rel_fp_tid), .rel_fp_preg_i(rel_fp_preg),
    .int_free_o(int_free), .fp_free_o(fp_free), .int_used_o(int_used), .fp_used_o(fp_used),
    .wb_valid_i(wb_valid), .wb_tid_i(wb_tid), .wb_dest_i(wb_dest),
    .cm_valid_i(cm_valid), .cm_tid_i(cm_tid), .cm_class_i(cm_class),
    .cm_dest_valid_i(cm_dest_valid), .cm_areg_i(cm_areg), .cm_data_i(cm_data),
    .ra_state_o(ra_state), .ra_mode_o(ra_mode), .restoring_o(restoring), .enter_o(enter), .exit_o(exit_p),
    .restart_pc_o(restart_pc),
    .rs_valid_o(rs_valid), .rs_tid_o(rs_tid), .rs_areg_o(rs_areg), .rs_data_o(rs_data),
    .inv_o(inv));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  logic [X-1:0] ref_regs [T][NENT];
  int restored [T];

  // mechanism counters
  int n_enter, n_exit, n_restore_done, n_inv_issue, n_valid_issue, n_fp_drop, n_sync_drop;
  int n_ren_ok, n_ren_stall, n_reg_release;
  int n_cs_invalid, n_nodest, n_ra_miss_inv, n_multi_ra, n_hold_restore, n_junk_ignored;
  int n_grant [T];
  int n_grant_ra;
  int enter_cyc [T];
  int ra_len [T];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- memory: L2 misses return after MEM_LAT cycles --------
  int mq_id [$];
  int mq_due [$];
  task automatic mem_issue(int id);
    mq_id.push_back(id);
    mq_due.push_back(cyc + MEM_LAT);
  endtask
  always @(negedge clk) begin
    fill_valid <= 0;
    for (int i = 0; i < mq_id.size(); i++)
      if (mq_due[i] <= cyc) begin
        fill_valid <= 1;
        fill_id    <= MIDW'(mq_id[i]);
        mq_id.delete(i);
        mq_due.delete(i);
        break;
      end
  end

  // ---------------- fetch model feeding ICOUNT ---------------------------
  always @(negedge clk) begin
    fetched_valid <= fgv;
    fetched_tid   <= fgt;
    fetched_n     <= NW'(W);
    for (int t = 0; t < T; t++) left_n[t] <= ra_mode[t] ? NW'(8) : NW'(2);
  end

  // ---------------- observers -------------------------------------------
  always @(posedge clk) if (rst_n) begin
    if (fgv) begin
      n_grant[fgt]++;
      if (ra_mode[fgt]) n_grant_ra++;
      chk(!restoring[fgt], "no fetch for a thread being restored");
    end
    for (int t = 0; t < T; t++) begin
      if (enter[t]) begin n_enter++; enter_cyc[t] = cyc; end
      if (exit_p[t]) begin
        n_exit++;
        ra_len[t] = cyc - enter_cyc[t];
      end
      if (restoring[t]) n_hold_restore++;
    end
    if ($countones(ra_mode) > 1) n_multi_ra++;
    // restore stream against the committed values
    if (rs_valid) begin
      for (int r = 0; r < W; r++) begin
        chk(rs_data[r] == ref_regs[rs_tid][rs_areg[r]],
            $sformatf("restored t%0d a%0d", rs_tid, rs_areg[r]));
        restored[rs_tid]++;
      end
    end
    if (dut.u_ckpt.restore_done_o != 0) n_restore_done += $countones(dut.u_ckpt.restore_done_o);
  end

  // ---------------- helpers ---------------------------------------------
  task automatic idle_core();
    head_valid = '0; head_is_load = '0; head_l2_miss = '0; head_miss_id = '0;
    head_pc = '0; head_dest = '0;
    ra_miss_valid = 0; ra_miss_tid = '0; ra_miss_dest = '0;
    dec_valid = '0; dec_tid = '0;
    iss_valid = '0; iss_tid = '0; iss_src_used = '0; iss_src = '0; iss_force = '0;
    iss_dest_valid = '0; iss_dest = '0;
    wb_valid = '0; wb_tid = '0; wb_dest = '0;
    ren_int_req = '0; ren_fp_req = '0; ren_tid = '0;
    rel_int_valid = '0; rel_int_tid = '0; rel_int_preg = '0;
    rel_fp_valid = '0; rel_fp_tid = '0; rel_fp_preg = '0;
    cm_valid = '0; cm_tid = '0; cm_dest_valid = '0; cm_areg = '0; cm_data = '0;
    for (int l = 0; l < W; l++) begin dec_class[l] = IC_NOP; cm_class[l] = IC_NOP; end
  endtask

  task automatic next();
    @(negedge clk);
    idle_core();
  endtask

  // commit a group of 8 register writes for thread t; normal threads update ref
  task automatic commit_group(int t, int base, bit junk);
    for (int l = 0; l < W; l++) begin
      cm_valid[l] = 1; cm_tid[l] = TW'(t); cm_class[l] = IC_INT; cm_dest_valid[l] = 1;
      cm_areg[l] = AW'((base + l) % NENT);
      cm_data[l] = junk ? 64'hDEAD_0000_0000_0000 | X'(base + l) : {$urandom, $urandom};
      if (!ra_mode[t] && !enter[t]) ref_regs[t][(base + l) % NENT] = cm_data[l];
      else n_junk_ignored++;
    end
  endtask

  task automatic head_miss(int t, int id, int pc, int dst);
    head_valid[t] = 1; head_is_load[t] = 1; head_l2_miss[t] = 1;
    head_miss_id[t] = MIDW'(id); head_pc[t] = PCW'(pc); head_dest[t] = PRW'(dst);
  endtask

  task automatic decode_and_count(int t, iclass_e g [W]);
    dec_tid = TW'(t); dec_valid = '1;
    for (int l = 0; l < W; l++) dec_class[l] = g[l];
    #1;
    for (int l = 0; l < W; l++) begin
      if (g[l] == IC_FP && dec_action[l] == DA_DROP) n_fp_drop++;
      if ((g[l] == IC_ACQUIRE || g[l] == IC_RELEASE) && dec_action[l] == DA_DROP) n_sync_drop++;
      if (dec_action[l] == DA_INVALID) n_cs_invalid++;
      if (dec_action[l] == DA_NODEST) n_nodest++;
    end
  endtask

  // ---------------- scenario --------------------------------------------
  initial begin
    iclass_e g [W];
    thread_active = '1; fetch_stall = '0;
    fetched_valid = 0; fetched_tid = '0; fetched_n = '0; left_n = '0;
    fill_valid = 0; fill_id = '0;
    for (int t = 0; t < T; t++) begin n_grant[t] = 0; restored[t] = 0; end
    idle_core();
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. committed state for every register of every thread
    for (int t = 0; t < T; t++)
      for (int b = 0; b < NENT / W; b++) begin
        commit_group(t, b * W, 0);
        next();
      end

    // 1b. shared register pools: 320 - 32*4 = 192 rename registers per file
    begin
      int got [$];
      int fp_before;
      chk(int_free == 192 && fp_free == 192, "192 free rename registers per file");
      ren_tid = 0; ren_int_req = 8'hFF; ren_fp_req = 8'b0000_0011;
      #1;
      chk(ren_ok == 1, "rename group of thread 0 served");
      chk(ren_int_preg[0] == 128 && ren_int_preg[7] == 135 && ren_fp_preg[0] == 128 &&
          ren_fp_preg[1] == 129, "first free registers handed out");
      n_ren_ok += ren_ok;
      next();
      chk(int_used[0] == 40 && fp_used[0] == 34, "thread 0 holds 32+8 INT and 32+2 FP");
      // thread 2 takes INT registers until fewer than 8 remain
      while (int_free >= 8) begin
        ren_tid = 2; ren_int_req = 8'hFF;
        #1;
        for (int l = 0; l < W; l++) got.push_back(int'(ren_int_preg[l]));
        n_ren_ok += ren_ok;
        next();
      end
      // a group needing 8 INT and 1 FP must stall and take nothing from either file
      fp_before = int'(fp_free);
      ren_tid = 3; ren_int_req = 8'hFF; ren_fp_req = 8'b1;
      #1;
      chk(ren_ok == 0, "rename stalls when the INT pool is short");
      n_ren_stall += !ren_ok;
      next();
      chk(fp_free == CNW'(fp_before), "FP registers not taken by a stalled group");
      // thread 2 releases 8 registers (e.g. pseudo-retired in runahead)
      for (int l = 0; l < W; l++) begin
        rel_int_valid[l] = 1; rel_int_tid[l] = 2; rel_int_preg[l] = PRW'(got.pop_front());
      end
      n_reg_release += W;
      next();
      ren_tid = 3; ren_int_req = 8'hFF; ren_fp_req = 8'b1;
      #1;
      chk(ren_ok == 1, "released registers serve the stalled group");
      n_ren_ok += ren_ok;
      next();
      chk(int_used[3] == 40 && fp_used[3] == 33, "thread 3 occupancy");
    end

    // 2. thread 1: L2-missing load (id 5, PC 0x400, dest p100) at the head
    head_miss(1, 5, 'h400, 100);
    #1; chk(enter == 4'b0010, "thread 1 enters runahead");
    mem_issue(5);
    next();
    chk(ra_mode == 4'b0010, "thread 1 in runahead");
    chk(inv[1][100] == 1, "blocking load destination invalid");
    chk(restart_pc[1] == 'h400, "restart PC is the load");

    // dependent (p110 <- p100 + p7) and independent (p111 <- p7) instructions
    iss_valid[0] = 1; iss_tid[0] = 1; iss_src_used[0] = 2'b11; iss_src[0][0] = 100;
    iss_src[0][1] = 7; iss_dest_valid[0] = 1; iss_dest[0] = 110;
    iss_valid[1] = 1; iss_tid[1] = 1; iss_src_used[1] = 2'b01; iss_src[1][0] = 7;
    iss_dest_valid[1] = 1; iss_dest[1] = 111;
    #1;
    chk(iss_inv[0] == 1, "dependent instruction invalid");
    chk(iss_inv[1] == 0, "independent instruction valid");
    n_inv_issue += iss_inv[0]; n_valid_issue += !iss_inv[1];
    next();
    // second level: p112 <- p110 ; independent result of p111 written back
    iss_valid[2] = 1; iss_tid[2] = 1; iss_src_used[2] = 2'b01; iss_src[2][0] = 110;
    iss_dest_valid[2] = 1; iss_dest[2] = 112;
    wb_valid[1] = 1; wb_tid[1] = 1; wb_dest[1] = 111;
    #1;
    chk(iss_inv[2] == 1, "invalidity propagates");
    n_inv_issue += iss_inv[2];
    next();
    chk(inv[1][112] == 1 && inv[1][111] == 0, "INV bits after propagation");

    // decode groups of the runahead thread
    g = '{IC_INT, IC_FP, IC_FP_LOAD, IC_ACQUIRE, IC_LOAD, IC_INT, IC_RELEASE, IC_STORE};
    decode_and_count(1, g);
    chk(dec_action[1] == DA_DROP && dec_action[3] == DA_DROP && dec_action[6] == DA_DROP,
        "FP and synchronisation dropped");
    chk(dec_action[4] == DA_INVALID && dec_action[5] == DA_INVALID, "critical section invalid");
    chk(dec_action[2] == DA_NODEST && dec_action[7] == DA_NORMAL, "FP load prefetch, store normal");
    // thread 0 decodes the same group normally in its own cycle later
    next();
    decode_and_count(0, g);
    for (int l = 0; l < W; l++) chk(dec_action[l] == DA_NORMAL, "normal thread decode");
    next();

    // a runahead load of thread 1 misses in L2: invalidated, prefetch issued
    ra_miss_valid = 1; ra_miss_tid = 1; ra_miss_dest = 120;
    mem_issue(9);
    next();
    chk(inv[1][120] == 1, "runahead L2 miss invalidates its load");
    n_ra_miss_inv += inv[1][120];
    // the same port for a normal thread does nothing
    ra_miss_valid = 1; ra_miss_tid = 0; ra_miss_dest = 120;
    next();
    chk(inv[0][120] == 0, "normal-thread miss not invalidated");

    // 3. threads 2 and 3 enter together; thread 1 pseudo-retires junk,
    //    thread 0 commits normally
    head_miss(2, 12, 'h800, 200);
    head_miss(3, 13, 'hC00, 201);
    commit_group(0, 0, 0);
    #1; chk(enter == 4'b1100, "threads 2 and 3 enter together");
    mem_issue(12);
    mem_issue(13);
    next();
    for (int c = 0; c < 20; c++) begin
      commit_group(1, c * W, 1);
      next();
      commit_group((c % 2 != 0) ? 2 : 3, c * W, 1);
      next();
      commit_group(0, 8 + c * W, 0);
      next();
    end
    chk(ra_mode == 4'b1110, "three runahead threads at once");
    chk(ra_state[0] == RS_NORMAL && ra_state[1] == RS_RUNAHEAD, "controller states");
    chk(inv[2][200] && inv[3][201], "both blocking loads invalid");
    repeat (40) next();

    // 4. wait for all threads to come back to normal
    for (int c = 0; c < 3 * MEM_LAT && (ra_mode != 0 || restoring != 0); c++) begin
      if (exit_p[1]) chk(1, "exit");
      next();
      for (int t = 0; t < T; t++)
        if (restoring[t]) chk(inv[t] == '0, $sformatf("INV of thread %0d cleared", t));
    end
    chk(ra_mode == 0 && restoring == 0, "all threads back to normal");
    repeat (4) next();

    // ---- summary of mechanisms ----
    chk(n_enter == 3, $sformatf("runahead entries %0d", n_enter));
    chk(n_exit == 3, $sformatf("runahead exits %0d", n_exit));
    chk(n_restore_done == 3, $sformatf("restores %0d", n_restore_done));
    for (int t = 1; t < T; t++) begin
      chk(restored[t] == NENT, $sformatf("thread %0d restored %0d registers", t, restored[t]));
      chk(ra_len[t] >= MEM_LAT - 1 && ra_len[t] <= MEM_LAT + 2,
          $sformatf("thread %0d runahead lasted %0d cycles, memory latency %0d", t, ra_len[t], MEM_LAT));
    end
    for (int t = 0; t < T; t++) chk(n_grant[t] > 0, $sformatf("thread %0d was fetched", t));
    chk(n_grant_ra > 0,     "runahead threads were fetched");
    chk(n_inv_issue > 0,    "invalid instructions seen");
    chk(n_valid_issue > 0,  "valid runahead instructions seen");
    chk(n_fp_drop > 0,      "FP instructions dropped");
    chk(n_sync_drop > 0,    "synchronisation ignored");
    chk(n_cs_invalid > 0,   "critical section invalidated");
    chk(n_nodest > 0,       "FP memory operations address-only");
    chk(n_ra_miss_inv > 0,  "runahead L2 miss invalidated");
    chk(n_ren_ok > 0,       "rename groups served");
    chk(n_ren_stall > 0,    "rename stalled on an empty pool");
    chk(n_reg_release > 0,  "registers released to the pool");
    chk(n_multi_ra > 0,     "several runahead threads at once");
    chk(n_hold_restore > 0, "fetch held during restore");
    chk(n_junk_ignored > 0, "pseudo-retirements kept out of the checkpoint");
    $display("mechanisms: ren_ok=%0d ren_stall=%0d enter=%0d exit=%0d restore=%0d inv_issue=%0d fp_drop=%0d sync_drop=%0d cs_inv=%0d nodest=%0d ra_miss=%0d multi_ra_cycles=%0d hold=%0d junk=%0d grants=%0d/%0d/%0d/%0d ra_grants=%0d",
             n_ren_ok, n_ren_stall, n_enter, n_exit, n_restore_done, n_inv_issue, n_fp_drop, n_sync_drop, n_cs_invalid,
             n_nodest, n_ra_miss_inv, n_multi_ra, n_hold_restore, n_junk_ignored,
             n_grant[0], n_grant[1], n_grant[2], n_grant[3], n_grant_ra);
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
