// arch_checkpoint: per-thread checkpoint of the architectural registers.
//
// To roll back after runahead execution, a thread needs only the contents
// of its own architectural registers, not a copy of the whole physical
// register file. This block keeps, for each thread, one copy of its
// NAREG integer and NAREG floating-point architectural registers. In normal
// mode every commit that writes a register also writes this copy, so it
// always equals the committed state. When the thread enters runahead mode
// the copy is frozen (freeze_i high): pseudo-retired instructions do not
// touch it, so it holds the state at the blocking load, which is the
// checkpoint. On rollback, restore_start_i queues the thread; a sequencer
// then streams its 2*NAREG registers out, RLANES per cycle, for the core to
// write back into the physical registers its rename map points at, and
// pulses restore_done_o for that thread with the last beat. The first beat
// comes in the cycle after restore_start_i when the sequencer is idle;
// queued threads follow back to back.
//
// Keeping the copy up to date at commit (instead of copying the registers
// in the entry cycle), the register width, the restore width and the
// thread order of the sequencer (lowest pending thread first) are this
// design's choices. Architectural register index: bit log2(NAREG) selects
// the FP file. Within one cycle a later commit lane wins over an earlier
// one (program order). Restore takes 2*NAREG/RLANES cycles per thread.
module arch_checkpoint #(
  parameter int unsigned THREADS = 4,
  parameter int unsigned NAREG   = 32,   // architectural registers per file
  parameter int unsigned XLEN    = 64,
  parameter int unsigned WIDTH   = 8,    // commit lanes
  parameter int unsigned RLANES  = 8,    // registers restored per cycle
  localparam int unsigned TW     = (THREADS > 1) ? $clog2(THREADS) : 1,
  localparam int unsigned NENT   = 2 * NAREG,
  localparam int unsigned AW     = $clog2(NENT),
  localparam int unsigned NBEAT  = NENT / RLANES,
  localparam int unsigned BW     = (NBEAT > 1) ? $clog2(NBEAT) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // commits (normal mode) and pseudo-retirements (runahead mode)
  input  logic [WIDTH-1:0]           cm_valid_i,   // retires and writes a register
  input  logic [WIDTH-1:0][TW-1:0]   cm_tid_i,
  input  logic [WIDTH-1:0][AW-1:0]   cm_areg_i,
  input  logic [WIDTH-1:0][XLEN-1:0] cm_data_i,
  input  logic [THREADS-1:0]         freeze_i,     // thread is not in normal mode
  // rollback
  input  logic [THREADS-1:0]         restore_start_i,
  output logic                       rs_valid_o,
  output logic [TW-1:0]              rs_tid_o,
  output logic [RLANES-1:0][AW-1:0]  rs_areg_o,
  output logic [RLANES-1:0][XLEN-1:0] rs_data_o,
  output logic [THREADS-1:0]         restore_done_o
);

  logic [XLEN-1:0] regs_q [THREADS][NENT];

  // ---- commit side ----
  always_ff @(posedge clk) begin
    for (int l = 0; l < WIDTH; l++)
      if (cm_valid_i[l] && 32'(cm_tid_i[l]) < THREADS && !freeze_i[cm_tid_i[l]])
        regs_q[cm_tid_i[l]][cm_areg_i[l]] <= cm_data_i[l];
  end

  // ---- restore sequencer ----
  logic [THREADS-1:0] pend_q;
  logic               busy_q;
  logic [TW-1:0]      cur_q;
  logic [BW-1:0]      beat_q;
  logic               pick_valid;
  logic [TW-1:0]      pick_tid;
  logic               last_beat;

  always_comb begin
    pick_valid = 1'b0;
    pick_tid   = '0;
    for (int t = THREADS - 1; t >= 0; t--)
      if (pend_q[t] || restore_start_i[t]) begin
        pick_valid = 1'b1;
        pick_tid   = TW'(t);
      end
  end

  assign last_beat = busy_q && (32'(beat_q) == NBEAT - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q <= '0;
      busy_q <= 1'b0;
      cur_q  <= '0;
      beat_q <= '0;
    end else begin
      if ((!busy_q || last_beat) && pick_valid) begin
        busy_q <= 1'b1;
        cur_q  <= pick_tid;
        beat_q <= '0;
      end else if (busy_q) begin
        if (last_beat) busy_q <= 1'b0;
        else           beat_q <= beat_q + 1'b1;
      end
      for (int t = 0; t < THREADS; t++) begin
        if (restore_start_i[t])                         pend_q[t] <= 1'b1;
        if ((!busy_q || last_beat) && pick_valid && pick_tid == TW'(t)) pend_q[t] <= 1'b0;
      end
    end
  end

  assign rs_valid_o = busy_q;
  assign rs_tid_o   = cur_q;
  always_comb begin
    for (int r = 0; r < RLANES; r++) begin
      rs_areg_o[r] = AW'(32'(beat_q) * RLANES + r);
      rs_data_o[r] = regs_q[cur_q][rs_areg_o[r]];
    end
    for (int t = 0; t < THREADS; t++)
      restore_done_o[t] = last_beat && (cur_q == TW'(t));
  end

  // The restore width must divide the number of architectural registers.
  initial assert (NENT % RLANES == 0)
    else $error("arch_checkpoint: RLANES must divide 2*NAREG");

endmodule
