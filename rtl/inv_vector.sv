// inv_vector: per-thread invalid (INV) bit vectors over the physical registers.
//
// While a thread runs ahead, the result of the load that started runahead
// mode is unknown. Its destination register is marked invalid, and the mark
// spreads: an instruction that reads an invalid register is not executed,
// its own destination is marked invalid and it goes straight to
// pseudo-retirement. Each thread has its own vector, one bit per physical
// register, so several threads can run ahead at once. A valid writeback
// clears its destination's bit; leaving runahead mode clears the whole
// vector of that thread. Loads that miss in L2 during runahead are
// invalidated the same way through the set ports (only their prefetch
// remains).
//
// Interface: LANES issue lanes, each with NSRC source registers; iss_inv_o
// tells, combinationally in the issue cycle, whether the lane's instruction
// is invalid (forced, or any used source INV). Its destination bit is
// written at the next clock edge, so a consumer issuing one cycle later sees
// it. LANES writeback lanes clear bits, NSET set ports set bits,
// clr_thread_i clears a thread's vector. At one clock edge, a thread clear
// wins over every set, and a set wins over a writeback clear of the same bit.
// The per-thread, per-physical-register organisation follows the design
// description; the port counts and priorities are this design's choices.
module inv_vector #(
  parameter int unsigned THREADS = 4,
  parameter int unsigned NPREG   = 320,  // physical registers in the file
  parameter int unsigned LANES   = 8,    // issue and writeback lanes
  parameter int unsigned NSRC    = 2,    // source operands per instruction
  parameter int unsigned NSET    = 2,    // direct set ports
  localparam int unsigned TW     = (THREADS > 1) ? $clog2(THREADS) : 1,
  localparam int unsigned PRW    = $clog2(NPREG)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // issue lanes
  input  logic [LANES-1:0]          iss_valid_i,
  input  logic [LANES-1:0][TW-1:0]  iss_tid_i,
  input  logic [LANES-1:0][NSRC-1:0] iss_src_used_i,
  input  logic [LANES-1:0][NSRC-1:0][PRW-1:0] iss_src_i,
  input  logic [LANES-1:0]          iss_force_inv_i,   // marked invalid at decode
  input  logic [LANES-1:0]          iss_dest_valid_i,
  input  logic [LANES-1:0][PRW-1:0] iss_dest_i,
  output logic [LANES-1:0]          iss_inv_o,
  // valid results written back
  input  logic [LANES-1:0]          wb_valid_i,
  input  logic [LANES-1:0][TW-1:0]  wb_tid_i,
  input  logic [LANES-1:0][PRW-1:0] wb_dest_i,
  // direct invalidation (blocking load, L2-missing loads in runahead)
  input  logic [NSET-1:0]           set_valid_i,
  input  logic [NSET-1:0][TW-1:0]   set_tid_i,
  input  logic [NSET-1:0][PRW-1:0]  set_preg_i,
  // clear a thread's vector when it leaves runahead mode
  input  logic [THREADS-1:0]        clr_thread_i,
  // current vectors
  output logic [THREADS-1:0][NPREG-1:0] inv_o
);

  logic [THREADS-1:0][NPREG-1:0] inv_q, inv_d;

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      iss_inv_o[l] = iss_force_inv_i[l];
      for (int s = 0; s < NSRC; s++)
        if (iss_src_used_i[l][s] && 32'(iss_src_i[l][s]) < NPREG)
          iss_inv_o[l] = iss_inv_o[l] | inv_q[iss_tid_i[l]][iss_src_i[l][s]];
    end
  end

  always_comb begin
    inv_d = inv_q;
    // valid writebacks clear (lowest priority)
    for (int l = 0; l < LANES; l++)
      if (wb_valid_i[l] && 32'(wb_tid_i[l]) < THREADS && 32'(wb_dest_i[l]) < NPREG)
        inv_d[wb_tid_i[l]][wb_dest_i[l]] = 1'b0;
    // issuing instructions write their destination's validity
    for (int l = 0; l < LANES; l++)
      if (iss_valid_i[l] && iss_dest_valid_i[l] && iss_inv_o[l] &&
          32'(iss_tid_i[l]) < THREADS && 32'(iss_dest_i[l]) < NPREG)
        inv_d[iss_tid_i[l]][iss_dest_i[l]] = 1'b1;
    // direct sets
    for (int p = 0; p < NSET; p++)
      if (set_valid_i[p] && 32'(set_tid_i[p]) < THREADS && 32'(set_preg_i[p]) < NPREG)
        inv_d[set_tid_i[p]][set_preg_i[p]] = 1'b1;
    // thread clear (highest priority)
    for (int t = 0; t < THREADS; t++)
      if (clr_thread_i[t]) inv_d[t] = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inv_q <= '0;
    else        inv_q <= inv_d;
  end

  assign inv_o = inv_q;

endmodule
