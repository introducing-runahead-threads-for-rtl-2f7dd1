// smtra_runahead_unit: runahead-thread support for a shared-resource SMT core.
//
// In an SMT core whose threads share the reorder buffer, issue queues,
// physical registers and functional units, a thread waiting for a load that
// missed in L2 holds its resources for hundreds of cycles and starves the
// others. Runahead threads turn such a thread into a light, speculative one:
// instead of stalling it keeps fetching and pseudo-retiring, its dependent
// work is invalidated and pseudo-retired at once, its FP work is dropped, and
// its independent loads go to memory early as prefetches. When the blocking
// miss returns the thread rolls back to a checkpoint and re-executes from the
// load, now finding its data in the cache.
//
// This unit holds everything the runahead threads add to the core, and
// connects to the core through plain ports:
//   * runahead_ctrl (one per thread): NORMAL -> RUNAHEAD -> RESTORE -> NORMAL.
//   * inv_vector: per-thread INV bits over the integer physical registers.
//     On entry the blocking load's destination is invalidated; a further
//     set port takes loads that miss in L2 while running ahead. A thread's
//     vector is cleared when it leaves runahead.
//   * arch_checkpoint: per-thread architectural register copy, frozen from
//     entry until the restore has finished; restored on exit.
//   * ra_decode_filter: drops FP work and synchronisation, invalidates
//     critical sections of runahead threads.
//   * preg_pool (INT and FP): the fixed total of physical registers, shared
//     by all threads; what the architectural registers do not hold is one
//     common rename pool. A rename group is served only if both files fit.
//     Runahead threads return their registers early (pseudo-retirement),
//     which is what makes them light.
//   * icount_fetch: ICOUNT thread selection; a thread is not fetched while
//     its checkpoint is being restored, and its count is cleared when its
//     pipeline is flushed on exit.
// The core (fetch, decode, rename map, issue, execute, ROB, caches) is not part
// of this unit. Its obligations: flush the thread and redirect fetch to
// restart_pc_o[t] on exit_o[t]; pseudo-retire the head load on enter_o[t];
// write the restore stream into the physical registers mapped to the
// architectural ones; not execute lanes for which iss_inv_o is set, but
// send them to pseudo-retirement; not update memory or architectural state
// for a thread while ra_mode_o[t] is high; return freed physical registers
// on rel_int_*/rel_fp_* (retirement, pseudo-retirement, squash).
//
// Timing: all outputs are combinational from the inputs of the same cycle
// or from registered state; see the sub-blocks for their latencies.
module smtra_runahead_unit
  import ra_pkg::*;
#(
  parameter int unsigned THREADS = 4,
  parameter int unsigned WIDTH   = 8,
  parameter int unsigned NPREG   = 320,
  parameter int unsigned NAREG   = 32,
  parameter int unsigned XLEN    = 64,
  parameter int unsigned PCW     = 64,
  parameter int unsigned MIDW    = 6,
  parameter int unsigned CW      = 10,
  localparam int unsigned TW     = (THREADS > 1) ? $clog2(THREADS) : 1,
  localparam int unsigned PRW    = $clog2(NPREG),
  localparam int unsigned AW     = $clog2(2 * NAREG),
  localparam int unsigned NW     = $clog2(WIDTH + 1),
  localparam int unsigned CNW    = $clog2(NPREG + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // ---- fetch ----
  input  logic [THREADS-1:0]          thread_active_i,
  input  logic [THREADS-1:0]          fetch_stall_i,      // e.g. I-cache miss
  input  logic                        fetched_valid_i,    // instructions fetched last grant
  input  logic [TW-1:0]               fetched_tid_i,
  input  logic [NW-1:0]               fetched_n_i,
  input  logic [THREADS-1:0][NW-1:0]  left_n_i,           // left decode/queues per thread
  output logic                        fetch_grant_valid_o,
  output logic [TW-1:0]               fetch_grant_tid_o,
  output logic [THREADS-1:0][CW-1:0]  icount_o,
  // ---- oldest instruction of each thread ----
  input  logic [THREADS-1:0]          head_valid_i,
  input  logic [THREADS-1:0]          head_is_load_i,
  input  logic [THREADS-1:0]          head_l2_miss_i,
  input  logic [THREADS-1:0][MIDW-1:0] head_miss_id_i,
  input  logic [THREADS-1:0][PCW-1:0] head_pc_i,
  input  logic [THREADS-1:0][PRW-1:0] head_dest_i,
  // ---- memory: L2 miss returns, L2 misses of runahead loads ----
  input  logic                        fill_valid_i,
  input  logic [MIDW-1:0]             fill_id_i,
  input  logic                        ra_miss_valid_i,
  input  logic [TW-1:0]               ra_miss_tid_i,
  input  logic [PRW-1:0]              ra_miss_dest_i,
  // ---- decode ----
  input  logic [WIDTH-1:0]            dec_valid_i,
  input  logic [TW-1:0]               dec_tid_i,
  input  iclass_e [WIDTH-1:0]         dec_class_i,
  output daction_e [WIDTH-1:0]        dec_action_o,
  // ---- issue ----
  input  logic [WIDTH-1:0]            iss_valid_i,
  input  logic [WIDTH-1:0][TW-1:0]    iss_tid_i,
  input  logic [WIDTH-1:0][1:0]       iss_src_used_i,
  input  logic [WIDTH-1:0][1:0][PRW-1:0] iss_src_i,
  input  logic [WIDTH-1:0]            iss_force_inv_i,
  input  logic [WIDTH-1:0]            iss_dest_valid_i,
  input  logic [WIDTH-1:0][PRW-1:0]   iss_dest_i,
  output logic [WIDTH-1:0]            iss_inv_o,
  // ---- rename: physical register allocation and release ----
  input  logic [WIDTH-1:0]            ren_int_req_i,      // lanes needing an INT register
  input  logic [WIDTH-1:0]            ren_fp_req_i,       // lanes needing an FP register
  input  logic [TW-1:0]               ren_tid_i,
  output logic                        ren_ok_o,           // group renamed (both files fit)
  output logic [WIDTH-1:0][PRW-1:0]   ren_int_preg_o,
  output logic [WIDTH-1:0][PRW-1:0]   ren_fp_preg_o,
  input  logic [WIDTH-1:0]            rel_int_valid_i,    // INT registers released
  input  logic [WIDTH-1:0][TW-1:0]    rel_int_tid_i,
  input  logic [WIDTH-1:0][PRW-1:0]   rel_int_preg_i,
  input  logic [WIDTH-1:0]            rel_fp_valid_i,     // FP registers released
  input  logic [WIDTH-1:0][TW-1:0]    rel_fp_tid_i,
  input  logic [WIDTH-1:0][PRW-1:0]   rel_fp_preg_i,
  output logic [CNW-1:0]              int_free_o,
  output logic [CNW-1:0]              fp_free_o,
  output logic [THREADS-1:0][CNW-1:0] int_used_o,         // INT registers held per thread
  output logic [THREADS-1:0][CNW-1:0] fp_used_o,
  // ---- writeback of valid results ----
  input  logic [WIDTH-1:0]            wb_valid_i,
  input  logic [WIDTH-1:0][TW-1:0]    wb_tid_i,
  input  logic [WIDTH-1:0][PRW-1:0]   wb_dest_i,
  // ---- commit / pseudo-retire ----
  input  logic [WIDTH-1:0]            cm_valid_i,
  input  logic [WIDTH-1:0][TW-1:0]    cm_tid_i,
  input  iclass_e [WIDTH-1:0]         cm_class_i,
  input  logic [WIDTH-1:0]            cm_dest_valid_i,
  input  logic [WIDTH-1:0][AW-1:0]    cm_areg_i,
  input  logic [WIDTH-1:0][XLEN-1:0]  cm_data_i,
  // ---- runahead status and commands ----
  output ra_state_e [THREADS-1:0]     ra_state_o,
  output logic [THREADS-1:0]          ra_mode_o,
  output logic [THREADS-1:0]          restoring_o,
  output logic [THREADS-1:0]          enter_o,
  output logic [THREADS-1:0]          exit_o,
  output logic [THREADS-1:0][PCW-1:0] restart_pc_o,
  // ---- checkpoint restore stream ----
  output logic                        rs_valid_o,
  output logic [TW-1:0]               rs_tid_o,
  output logic [WIDTH-1:0][AW-1:0]    rs_areg_o,
  output logic [WIDTH-1:0][XLEN-1:0]  rs_data_o,
  output logic [THREADS-1:0][NPREG-1:0] inv_o
);

  logic [THREADS-1:0]          restore_done;
  logic [THREADS-1:0][PRW-1:0] enter_dest;
  logic [THREADS-1:0]          freeze;

  // ---- per-thread runahead controllers ----
  for (genvar t = 0; t < THREADS; t++) begin : g_ctrl
    runahead_ctrl #(.PCW(PCW), .MIDW(MIDW), .PRW(PRW)) u_ctrl (
      .clk, .rst_n,
      .head_valid_i  (head_valid_i[t]),
      .head_is_load_i(head_is_load_i[t]),
      .head_l2_miss_i(head_l2_miss_i[t]),
      .head_miss_id_i(head_miss_id_i[t]),
      .head_pc_i     (head_pc_i[t]),
      .head_dest_i   (head_dest_i[t]),
      .fill_valid_i,
      .fill_id_i,
      .restore_done_i(restore_done[t]),
      .state_o       (ra_state_o[t]),
      .ra_mode_o     (ra_mode_o[t]),
      .restore_o     (restoring_o[t]),
      .enter_o       (enter_o[t]),
      .enter_dest_o  (enter_dest[t]),
      .exit_o        (exit_o[t]),
      .restart_pc_o  (restart_pc_o[t])
    );
  end

  // The checkpoint is frozen from the entry cycle until the restore is done.
  assign freeze = ra_mode_o | restoring_o | enter_o;

  // ---- INV bits: set port t = thread t's blocking load on entry,
  //      set port THREADS = L2 miss of a load executed in runahead mode ----
  localparam int unsigned NSET = THREADS + 1;
  logic [NSET-1:0]          set_valid;
  logic [NSET-1:0][TW-1:0]  set_tid;
  logic [NSET-1:0][PRW-1:0] set_preg;

  always_comb begin
    for (int t = 0; t < THREADS; t++) begin
      set_valid[t] = enter_o[t];
      set_tid[t]   = TW'(t);
      set_preg[t]  = enter_dest[t];
    end
    set_valid[THREADS] = ra_miss_valid_i && (32'(ra_miss_tid_i) < THREADS) &&
                         ra_mode_o[ra_miss_tid_i];
    set_tid[THREADS]   = ra_miss_tid_i;
    set_preg[THREADS]  = ra_miss_dest_i;
  end

  inv_vector #(.THREADS(THREADS), .NPREG(NPREG), .LANES(WIDTH), .NSRC(2), .NSET(NSET)) u_inv (
    .clk, .rst_n,
    .iss_valid_i, .iss_tid_i, .iss_src_used_i, .iss_src_i, .iss_force_inv_i,
    .iss_dest_valid_i, .iss_dest_i, .iss_inv_o,
    .wb_valid_i, .wb_tid_i, .wb_dest_i,
    .set_valid_i (set_valid),
    .set_tid_i   (set_tid),
    .set_preg_i  (set_preg),
    .clr_thread_i(exit_o),
    .inv_o
  );

  // ---- architectural checkpoint ----
  logic [WIDTH-1:0] cm_write;
  always_comb
    for (int l = 0; l < WIDTH; l++) cm_write[l] = cm_valid_i[l] && cm_dest_valid_i[l];

  arch_checkpoint #(.THREADS(THREADS), .NAREG(NAREG), .XLEN(XLEN), .WIDTH(WIDTH),
                    .RLANES(WIDTH)) u_ckpt (
    .clk, .rst_n,
    .cm_valid_i     (cm_write),
    .cm_tid_i, .cm_areg_i, .cm_data_i,
    .freeze_i       (freeze),
    .restore_start_i(exit_o),
    .rs_valid_o, .rs_tid_o, .rs_areg_o, .rs_data_o,
    .restore_done_o (restore_done)
  );

  // ---- decode filter ----
  ra_decode_filter #(.THREADS(THREADS), .WIDTH(WIDTH)) u_filter (
    .clk, .rst_n,
    .ra_mode_i (ra_mode_o),
    .ra_enter_i(enter_o),
    .dec_valid_i, .dec_tid_i, .dec_class_i, .dec_action_o,
    .cm_valid_i, .cm_tid_i, .cm_class_i
  );

  // ---- shared physical register pools (INT and FP files) ----
  // A rename group takes its registers only when both files can serve it.
  logic int_fit, fp_fit, int_ok, fp_ok;

  preg_pool #(.THREADS(THREADS), .NPREG(NPREG), .NAREG(NAREG), .WIDTH(WIDTH)) u_int_pool (
    .clk, .rst_n,
    .alloc_req_i (ren_int_req_i),
    .alloc_tid_i (ren_tid_i),
    .alloc_hold_i(!fp_fit),
    .alloc_fit_o (int_fit),
    .alloc_ok_o  (int_ok),
    .alloc_preg_o(ren_int_preg_o),
    .free_valid_i(rel_int_valid_i),
    .free_tid_i  (rel_int_tid_i),
    .free_preg_i (rel_int_preg_i),
    .free_count_o(int_free_o),
    .used_o      (int_used_o)
  );

  preg_pool #(.THREADS(THREADS), .NPREG(NPREG), .NAREG(NAREG), .WIDTH(WIDTH)) u_fp_pool (
    .clk, .rst_n,
    .alloc_req_i (ren_fp_req_i),
    .alloc_tid_i (ren_tid_i),
    .alloc_hold_i(!int_fit),
    .alloc_fit_o (fp_fit),
    .alloc_ok_o  (fp_ok),
    .alloc_preg_o(ren_fp_preg_o),
    .free_valid_i(rel_fp_valid_i),
    .free_tid_i  (rel_fp_tid_i),
    .free_preg_i (rel_fp_preg_i),
    .free_count_o(fp_free_o),
    .used_o      (fp_used_o)
  );

  assign ren_ok_o = int_ok && fp_ok;

  // ---- ICOUNT fetch ----
  icount_fetch #(.THREADS(THREADS), .WIDTH(WIDTH), .CW(CW)) u_fetch (
    .clk, .rst_n,
    .active_i   (thread_active_i),
    .stall_i    (fetch_stall_i | restoring_o),
    .inc_valid_i(fetched_valid_i),
    .inc_tid_i  (fetched_tid_i),
    .inc_n_i    (fetched_n_i),
    .dec_n_i    (left_n_i),
    .flush_i    (exit_o),
    .grant_valid_o(fetch_grant_valid_o),
    .grant_tid_o  (fetch_grant_tid_o),
    .count_o      (icount_o)
  );

endmodule
