// tb_smtra_workloads: the runahead-thread unit at its default size (4 threads,
// 8 wide, 320 + 320 physical registers, 400-cycle memory) under the six
// thread mixes of the evaluation: ILP2, MIX2, MEM2 (two threads running) and
// ILP4, MIX4, MEM4 (four threads running).
//
// The programs themselves cannot run without a core, so each thread is
// reduced to its memory behaviour: an ILP thread rarely has an L2-missing
// load at the head of its window, a memory-bound (MEM) thread often does,
// and a MIX workload pairs the two kinds. Around that the testbench plays
// the core at random: rename groups, register releases (fast for runahead
// threads, slow for normal ones), decode groups, issue lanes with
// dependences among a small set of registers, writebacks, commits with
// random values, junk pseudo-retirements during runahead, L2 misses of
// runahead loads (prefetches) and a memory that answers each miss 400
// cycles after it was issued, one fill per cycle. The programs are single
// threaded, so no acquire or release is decoded.
//
// Every cycle the outputs are compared with reference models kept here:
// entry and exit of each controller (exit only on the blocking miss),
// restart PC, the decode action table, the INV bits of issue lanes and of
// all 4 x 320 registers, the register pools (fit, distinct free registers,
// free and per-thread counts), ICOUNT's choice of the eligible thread with
// the smallest count, no fetch during a restore, and the restored
// architectural values. For each workload the testbench prints the runahead
// episodes, their mean length, the cycles with several threads in runahead,
// the prefetches, the rename stalls and the mean number of INT rename
// registers a thread holds per cycle in normal and in runahead mode (read
// from int_used_o; the numbers follow from the release rates this testbench
// plays, not from real programs), and it counts a failure when a
// workload with memory-bound threads never ran ahead, or MEM4 never had two
// threads running ahead at once.
module tb_smtra_workloads;
  import ra_pkg::*;

  localparam int T = 4, W = 8, NP = 320, NA = 32, X = 64, PCW = 64, MIDW = 6, CW = 10;
  localparam int TW = 2, PRW = 9, AW = 6, NW = 4, CNW = 9, NENT = 2 * NA, NID = 64;
  localparam int MEM_LAT = 400;
  localparam int CYCLES  = 3000;     // per workload
  localparam int HOT     = 48;       // registers used by the dependence traffic

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
    .ra_state_o(ra_state), .ra_mode_o(ra_mode), .restoring_o(restoring), .enter_o(enter),
    .exit_o(exit_p), .restart_pc_o(restart_pc),
    .rs_valid_o(rs_valid), .rs_tid_o(rs_tid), .rs_areg_o(rs_areg), .rs_data_o(rs_data),
    .inv_o(inv));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // ---------------- reference state --------------------------------------
  bit            ref_inv  [T][NP];
  logic [X-1:0]  ref_regs [T][NENT];
  bit            ifree [NP], ffree [NP];
  int            iused [T], fused [T];
  int            iheld [T][$], fheld [T][$];
  bit            id_busy [NID];
  int            mq_id [$], mq_due [$];
  int            blk_id [T];
  logic [PCW-1:0] blk_pc [T];
  int            enter_cyc [T];
  int            restored [T];
  ra_state_e     prev_state [T];
  int            miss_period [T];   // mean cycles between head misses
  bit            last_fgv;          // grant of the previous cycle, fetched now
  logic [TW-1:0] last_fgt;

  // per-workload statistics
  int s_enter, s_exit, s_ra_cycles, s_multi, s_prefetch, s_ren_ok, s_ren_stall, s_ra_grants;
  longint s_len;
  longint s_regs_nm, s_cyc_nm, s_regs_ra;   // rename registers held, by mode

  function automatic int nfree(input bit f [NP]);
    int n = 0;
    for (int r = 0; r < NP; r++) n += f[r];
    return n;
  endfunction

  function automatic int free_id();
    int start = $urandom_range(0, NID - 1);
    for (int k = 0; k < NID; k++)
      if (!id_busy[(start + k) % NID]) return (start + k) % NID;
    return -1;
  endfunction

  task automatic reset_refs(int nthreads);
    for (int t = 0; t < T; t++) begin
      for (int r = 0; r < NP; r++) ref_inv[t][r] = 0;
      for (int a = 0; a < NENT; a++) ref_regs[t][a] = '0;
      iheld[t].delete(); fheld[t].delete();
      for (int a = 0; a < NA; a++) begin
        iheld[t].push_back(t * NA + a);
        fheld[t].push_back(t * NA + a);
      end
      iused[t] = NA; fused[t] = NA;
      restored[t] = 0;
      prev_state[t] = RS_NORMAL;
      blk_id[t] = -1;
    end
    for (int r = 0; r < NP; r++) begin
      ifree[r] = (r >= T * NA);
      ffree[r] = (r >= T * NA);
    end
    for (int i = 0; i < NID; i++) id_busy[i] = 0;
    mq_id.delete(); mq_due.delete();
    s_enter = 0; s_exit = 0; s_ra_cycles = 0; s_multi = 0; s_prefetch = 0;
    s_ren_ok = 0; s_ren_stall = 0; s_ra_grants = 0; s_len = 0;
    s_regs_nm = 0; s_cyc_nm = 0; s_regs_ra = 0;
  endtask

  task automatic idle_inputs();
    thread_active = '0; fetch_stall = '0; fetched_valid = 0; fetched_tid = '0;
    fetched_n = '0; left_n = '0;
    head_valid = '0; head_is_load = '0; head_l2_miss = '0; head_miss_id = '0;
    head_pc = '0; head_dest = '0; fill_valid = 0; fill_id = '0;
    ra_miss_valid = 0; ra_miss_tid = '0; ra_miss_dest = '0;
    dec_valid = '0; dec_tid = '0; dec_class = '{default: IC_NOP};
    iss_valid = '0; iss_tid = '0; iss_src_used = '0; iss_src = '0; iss_force = '0;
    iss_dest_valid = '0; iss_dest = '0;
    ren_int_req = '0; ren_fp_req = '0; ren_tid = '0;
    rel_int_valid = '0; rel_int_tid = '0; rel_int_preg = '0;
    rel_fp_valid = '0; rel_fp_tid = '0; rel_fp_preg = '0;
    wb_valid = '0; wb_tid = '0; wb_dest = '0;
    cm_valid = '0; cm_tid = '0; cm_class = '{default: IC_NOP}; cm_dest_valid = '0;
    cm_areg = '0; cm_data = '0;
  endtask

  function automatic iclass_e rand_class();
    case ($urandom_range(0, 9))
      0, 1, 2: return IC_INT;
      3:       return IC_BRANCH;
      4, 5:    return IC_LOAD;
      6:       return IC_STORE;
      7:       return IC_FP;
      8:       return IC_FP_LOAD;
      default: return IC_FP_STORE;
    endcase
  endfunction

  // pick a random running thread
  function automatic int rand_thread(int nthreads);
    return $urandom_range(0, nthreads - 1);
  endfunction

  // release up to k registers of thread t on free lanes of one file
  task automatic plan_release(int t, int k, bit fp);
    for (int l = 0; l < W && k > 0; l++) begin
      if (fp) begin
        if (!rel_fp_valid[l] && fheld[t].size() > NA) begin
          int i = $urandom_range(NA, fheld[t].size() - 1);   // keep 32 architectural
          rel_fp_valid[l] = 1; rel_fp_tid[l] = TW'(t); rel_fp_preg[l] = PRW'(fheld[t][i]);
          fheld[t].delete(i); k--;
        end
      end else begin
        if (!rel_int_valid[l] && iheld[t].size() > NA) begin
          int i = $urandom_range(NA, iheld[t].size() - 1);
          rel_int_valid[l] = 1; rel_int_tid[l] = TW'(t); rel_int_preg[l] = PRW'(iheld[t][i]);
          iheld[t].delete(i); k--;
        end
      end
    end
  endtask

  // ---------------- one workload -----------------------------------------
  task automatic run_workload(string name, int nthreads, int kind);
    bit head_miss [T];
    bit lane_inv [W];
    int exp_action;
    for (int t = 0; t < T; t++)
      miss_period[t] = (kind == 0 || (kind == 1 && t % 2 == 0)) ? 3000 : 40;

    idle_inputs();
    rst_n = 0;
    last_fgv = 0; last_fgt = '0;
    reset_refs(nthreads);
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // the checkpoint copy has no reset: commit a known value into every
    // architectural register of every context first
    cyc = 0;
    for (int k = 0; k < T * NENT / W; k++) begin
      @(negedge clk);
      for (int l = 0; l < W; l++) begin
        int t = k / (NENT / W);
        int a = (k % (NENT / W)) * W + l;
        cm_valid[l] = 1; cm_tid[l] = TW'(t); cm_class[l] = IC_INT; cm_dest_valid[l] = 1;
        cm_areg[l] = AW'(a); cm_data[l] = {$urandom, $urandom};
        ref_regs[t][a] = cm_data[l];
      end
    end
    @(negedge clk);
    idle_inputs();

    for (cyc = 0; cyc < CYCLES; cyc++) begin
      @(negedge clk);
      idle_inputs();
      for (int t = 0; t < nthreads; t++) thread_active[t] = 1;
      fetched_valid = last_fgv; fetched_tid = last_fgt; fetched_n = NW'(W);

      // ---- memory returns at most one miss per cycle ----
      begin
        int best = -1;
        for (int i = 0; i < mq_id.size(); i++)
          if (mq_due[i] <= cyc && (best < 0 || mq_due[i] < mq_due[best])) best = i;
        if (best >= 0) begin
          fill_valid = 1;
          fill_id    = MIDW'(mq_id[best]);
          mq_id.delete(best); mq_due.delete(best);
        end
      end

      // ---- window heads ----
      for (int t = 0; t < nthreads; t++) begin
        head_miss[t] = 0;
        if (ra_state[t] == RS_NORMAL) begin
          head_valid[t]   = ($urandom_range(0, 3) != 0);
          head_is_load[t] = ($urandom_range(0, 2) == 0);
          if ($urandom_range(1, miss_period[t]) == 1) begin
            int id = free_id();
            if (id >= 0) begin
              head_valid[t] = 1; head_is_load[t] = 1; head_l2_miss[t] = 1;
              head_miss_id[t] = MIDW'(id);
              head_pc[t]      = {$urandom, $urandom};
              head_dest[t]    = PRW'($urandom_range(0, HOT - 1));
              head_miss[t]    = 1;
              id_busy[id]     = 1;
            end
          end
        end else if (ra_state[t] == RS_RUNAHEAD) begin
          head_valid[t] = ($urandom_range(0, 1) != 0);   // pseudo-retiring
        end
      end

      // ---- L2 misses of runahead loads: prefetches ----
      begin
        int t = rand_thread(nthreads);
        if (ra_mode[t] && $urandom_range(0, 19) == 0) begin
          int id = free_id();
          if (id >= 0) begin
            ra_miss_valid = 1; ra_miss_tid = TW'(t);
            ra_miss_dest  = PRW'($urandom_range(0, HOT - 1));
            id_busy[id] = 1;
            mq_id.push_back(id); mq_due.push_back(cyc + MEM_LAT);
            s_prefetch++;
          end
        end
      end

      // the returned id may be reused from the next cycle on
      if (fill_valid) id_busy[fill_id] = 0;

      // ---- fetch feedback for ICOUNT ----
      for (int t = 0; t < nthreads; t++) begin
        fetch_stall[t] = ($urandom_range(0, 15) == 0);
        left_n[t]      = ra_mode[t] ? NW'(8) : NW'($urandom_range(0, 3));
      end

      // ---- decode group (no synchronisation in these programs) ----
      dec_tid = TW'(rand_thread(nthreads));
      for (int l = 0; l < W; l++) begin
        dec_valid[l] = ($urandom_range(0, 3) != 0);
        dec_class[l] = rand_class();
      end

      // ---- issue lanes ----
      for (int l = 0; l < W; l++) begin
        int t = rand_thread(nthreads);
        iss_valid[l]      = ($urandom_range(0, 3) != 0);
        iss_tid[l]        = TW'(t);
        iss_src_used[l]   = 2'($urandom);
        iss_src[l][0]     = PRW'($urandom_range(0, HOT - 1));
        iss_src[l][1]     = PRW'($urandom_range(0, HOT - 1));
        iss_force[l]      = ra_mode[t] && ($urandom_range(0, 7) == 0);
        iss_dest_valid[l] = ($urandom_range(0, 4) != 0);
        iss_dest[l]       = PRW'($urandom_range(0, HOT - 1));
        wb_valid[l]       = ($urandom_range(0, 5) == 0);
        wb_tid[l]         = TW'(rand_thread(nthreads));
        wb_dest[l]        = PRW'($urandom_range(0, HOT - 1));
      end

      // ---- rename group and register releases ----
      ren_tid = TW'(rand_thread(nthreads));
      ren_int_req = W'($urandom) & W'($urandom);
      ren_fp_req  = ($urandom_range(0, 3) == 0) ? W'($urandom) & W'($urandom) : '0;
      for (int t = 0; t < nthreads; t++) begin
        // runahead threads pseudo-retire at once and give registers back fast
        plan_release(t, ra_mode[t] ? $urandom_range(0, 4) : $urandom_range(0, 1), 0);
        plan_release(t, ra_mode[t] ? $urandom_range(0, 2) : $urandom_range(0, 1), 1);
      end

      // ---- commits: real ones in normal mode, junk in runahead mode ----
      for (int l = 0; l < W; l++) begin
        int t = rand_thread(nthreads);
        if ($urandom_range(0, 2) != 0 && !head_miss[t] && ra_state[t] != RS_RESTORE) begin
          cm_valid[l]      = 1;
          cm_tid[l]        = TW'(t);
          cm_class[l]      = rand_class();
          cm_dest_valid[l] = ($urandom_range(0, 4) != 0);
          cm_areg[l]       = AW'($urandom_range(0, NENT - 1));
          cm_data[l]       = {$urandom, $urandom};
        end
      end

      #1;

      // ================= combinational checks =================
      for (int t = 0; t < T; t++) begin
        bit exp_enter = (t < nthreads) && head_miss[t] && ra_state[t] == RS_NORMAL;
        bit exp_exit  = ra_state[t] == RS_RUNAHEAD && fill_valid && blk_id[t] == int'(fill_id);
        chk(enter[t] == exp_enter, $sformatf("%s: enter t%0d", name, t));
        chk(exit_p[t] == exp_exit, $sformatf("%s: exit t%0d only on its blocking miss", name, t));
        chk(ra_mode[t] == (ra_state[t] == RS_RUNAHEAD), $sformatf("%s: ra_mode t%0d", name, t));
        chk(restoring[t] == (ra_state[t] == RS_RESTORE), $sformatf("%s: restoring t%0d", name, t));
        if (exit_p[t]) chk(restart_pc[t] == blk_pc[t], $sformatf("%s: restart pc t%0d", name, t));
      end

      // decode actions
      for (int l = 0; l < W; l++)
        if (dec_valid[l]) begin
          if (!ra_mode[dec_tid])                          exp_action = DA_NORMAL;
          else if (dec_class[l] == IC_FP)                 exp_action = DA_DROP;
          else if (dec_class[l] inside {IC_FP_LOAD, IC_FP_STORE}) exp_action = DA_NODEST;
          else                                            exp_action = DA_NORMAL;
          chk(int'(dec_action[l]) == exp_action, $sformatf("%s: decode lane %0d", name, l));
        end

      // issue-time invalidity
      for (int l = 0; l < W; l++) begin
        lane_inv[l] = iss_force[l];
        for (int s = 0; s < 2; s++)
          if (iss_src_used[l][s]) lane_inv[l] |= ref_inv[iss_tid[l]][iss_src[l][s]];
        if (iss_valid[l]) chk(iss_inv[l] == lane_inv[l], $sformatf("%s: iss_inv lane %0d", name, l));
      end

      // register pools
      begin
        bit ok = $countones(ren_int_req) <= nfree(ifree) && $countones(ren_fp_req) <= nfree(ffree);
        chk(ren_ok == ok, $sformatf("%s: ren_ok", name));
        if (ren_ok) begin
          if (ren_int_req != '0 || ren_fp_req != '0) s_ren_ok++;
          for (int l = 0; l < W; l++) begin
            if (ren_int_req[l]) begin
              chk(ifree[ren_int_preg[l]], $sformatf("%s: INT p%0d handed out while in use", name, ren_int_preg[l]));
              ifree[ren_int_preg[l]] = 0;
              iheld[ren_tid].push_back(int'(ren_int_preg[l]));
              iused[ren_tid]++;
            end
            if (ren_fp_req[l]) begin
              chk(ffree[ren_fp_preg[l]], $sformatf("%s: FP p%0d handed out while in use", name, ren_fp_preg[l]));
              ffree[ren_fp_preg[l]] = 0;
              fheld[ren_tid].push_back(int'(ren_fp_preg[l]));
              fused[ren_tid]++;
            end
          end
        end else s_ren_stall++;
        for (int l = 0; l < W; l++) begin
          if (rel_int_valid[l]) begin ifree[rel_int_preg[l]] = 1; iused[rel_int_tid[l]]--; end
          if (rel_fp_valid[l])  begin ffree[rel_fp_preg[l]]  = 1; fused[rel_fp_tid[l]]--;  end
        end
      end

      // ICOUNT: the eligible thread with the smallest count, never a restoring one
      begin
        bit any = 0;
        for (int t = 0; t < T; t++) if (thread_active[t] && !fetch_stall[t] && !restoring[t]) any = 1;
        chk(fgv == any, $sformatf("%s: fetch grant valid", name));
        if (fgv) begin
          chk(thread_active[fgt] && !fetch_stall[fgt] && !restoring[fgt],
              $sformatf("%s: grant to an eligible thread", name));
          for (int t = 0; t < T; t++)
            if (thread_active[t] && !fetch_stall[t] && !restoring[t])
              chk(icount[fgt] <= icount[t], $sformatf("%s: grant has the smallest count", name));
          if (ra_mode[fgt]) s_ra_grants++;
        end
        last_fgv = fgv; last_fgt = fgt;
      end

      // restore stream against the committed values
      if (rs_valid) begin
        chk(ra_state[rs_tid] == RS_RESTORE, $sformatf("%s: restore stream for a restoring thread", name));
        for (int r = 0; r < W; r++)
          chk(rs_data[r] == ref_regs[rs_tid][rs_areg[r]],
              $sformatf("%s: restored t%0d a%0d", name, rs_tid, rs_areg[r]));
        restored[rs_tid] += W;
      end

      // ================= reference next state =================
      for (int l = 0; l < W; l++)
        if (cm_valid[l] && cm_dest_valid[l] && ra_state[cm_tid[l]] == RS_NORMAL && !enter[cm_tid[l]])
          ref_regs[cm_tid[l]][cm_areg[l]] = cm_data[l];
      for (int l = 0; l < W; l++)
        if (wb_valid[l]) ref_inv[wb_tid[l]][wb_dest[l]] = 0;
      for (int l = 0; l < W; l++)
        if (iss_valid[l] && iss_dest_valid[l] && lane_inv[l]) ref_inv[iss_tid[l]][iss_dest[l]] = 1;
      for (int t = 0; t < T; t++)
        if (enter[t]) ref_inv[t][head_dest[t]] = 1;
      if (ra_miss_valid && ra_mode[ra_miss_tid]) ref_inv[ra_miss_tid][ra_miss_dest] = 1;
      for (int t = 0; t < T; t++)
        if (exit_p[t]) for (int r = 0; r < NP; r++) ref_inv[t][r] = 0;

      for (int t = 0; t < T; t++) begin
        if (enter[t]) begin
          blk_id[t] = int'(head_miss_id[t]);
          blk_pc[t] = head_pc[t];
          enter_cyc[t] = cyc;
          mq_id.push_back(blk_id[t]); mq_due.push_back(cyc + MEM_LAT);
          s_enter++;
        end
        if (exit_p[t]) begin
          chk(cyc - enter_cyc[t] >= MEM_LAT, $sformatf("%s: runahead lasts the memory latency", name));
          s_len += cyc - enter_cyc[t];
          s_exit++;
          blk_id[t] = -1;
          restored[t] = 0;
        end
        if (ra_mode[t]) s_ra_cycles++;
        // INT rename registers held (beyond the 32 architectural ones)
        if (t < nthreads) begin
          if (ra_mode[t]) s_regs_ra += int'(int_used[t]) - NA;
          else if (ra_state[t] == RS_NORMAL) begin
            s_regs_nm += int'(int_used[t]) - NA;
            s_cyc_nm++;
          end
        end
      end
      if ($countones(ra_mode) > 1) s_multi++;

      @(posedge clk); #1;

      // ================= registered state =================
      begin
        int bad = 0;
        for (int t = 0; t < T; t++)
          for (int r = 0; r < NP; r++)
            if (inv[t][r] != ref_inv[t][r]) bad++;
        chk(bad == 0, $sformatf("%s: %0d INV bits differ", name, bad));
      end
      chk(int'(int_free) == nfree(ifree) && int'(fp_free) == nfree(ffree),
          $sformatf("%s: free counts", name));
      for (int t = 0; t < T; t++) begin
        chk(int'(int_used[t]) == iused[t] && int'(fp_used[t]) == fused[t],
            $sformatf("%s: registers held by t%0d", name, t));
        if (prev_state[t] == RS_RESTORE && ra_state[t] == RS_NORMAL)
          chk(restored[t] == NENT, $sformatf("%s: t%0d restored all %0d registers", name, t, NENT));
        prev_state[t] = ra_state[t];
      end
    end

    $display("%s: episodes=%0d exits=%0d mean_len=%0d ra_cycles=%0d multi_ra_cycles=%0d prefetches=%0d ren_ok=%0d ren_stall=%0d ra_fetch_grants=%0d int_regs_held_normal=%0d int_regs_held_runahead=%0d",
             name, s_enter, s_exit, (s_exit > 0) ? int'(s_len / s_exit) : 0, s_ra_cycles, s_multi,
             s_prefetch, s_ren_ok, s_ren_stall, s_ra_grants,
             (s_cyc_nm > 0) ? int'(s_regs_nm / s_cyc_nm) : 0,
             (s_ra_cycles > 0) ? int'(s_regs_ra / s_ra_cycles) : 0);
    chk(s_exit + nthreads >= s_enter, $sformatf("%s: episodes end", name));
    if (kind != 0) chk(s_enter > 0 && s_exit > 0, $sformatf("%s: memory-bound threads ran ahead", name));
    if (kind == 2 && nthreads == 4) chk(s_multi > 0, $sformatf("%s: several runahead threads at once", name));
    chk(s_ren_ok > 0, $sformatf("%s: rename groups served", name));
  endtask

  int total_stall = 0;

  initial begin
    idle_inputs();
    run_workload("ILP2", 2, 0); total_stall += s_ren_stall;
    run_workload("MIX2", 2, 1); total_stall += s_ren_stall;
    run_workload("MEM2", 2, 2); total_stall += s_ren_stall;
    run_workload("ILP4", 4, 0); total_stall += s_ren_stall;
    run_workload("MIX4", 4, 1); total_stall += s_ren_stall;
    run_workload("MEM4", 4, 2); total_stall += s_ren_stall;
    chk(total_stall > 0, "a rename group stalled on a full pool");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6 * (CYCLES + T * NENT / W + 10) + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
