// runahead_ctrl: runahead mode state machine for one hardware thread.
//
// A thread runs normally until a load that missed in the L2 cache reaches
// the head of its reorder-buffer (ROB) share. In that cycle the thread takes
// its checkpoint (the architectural copy stops taking commits), the load's
// destination register is marked invalid (INV) and the thread enters
// runahead mode: the load is pseudo-retired and younger instructions keep
// executing speculatively without updating architectural state. When the
// memory system returns the blocking load's miss, the thread leaves runahead
// mode: its pipeline is flushed, fetch is redirected to the load's PC and
// the checkpoint is restored. Normal execution resumes once the restore is
// done. These three steps follow the runahead operation the design is built
// on; the separate RESTORE state, the miss identifier used to recognise the
// blocking load's return and the restart at the load's own PC are this
// design's choices.
//
// Interface: head_* describes the oldest instruction of this thread, fill_*
// the miss returns of the memory system (one per cycle). enter_o and exit_o
// are one-cycle pulses. Timing: enter_o is combinational from head_* in the
// NORMAL state; ra_mode_o rises in the next cycle. exit_o is combinational
// from fill_* in the RUNAHEAD state; restore_o is high from the next cycle
// until restore_done_i.
module runahead_ctrl
  import ra_pkg::*;
#(
  parameter int unsigned PCW  = 64,   // program counter width
  parameter int unsigned MIDW = 6,    // miss (MSHR) identifier width
  parameter int unsigned PRW  = 9     // physical register index width (320 registers)
) (
  input  logic            clk,
  input  logic            rst_n,
  // oldest instruction of this thread
  input  logic            head_valid_i,
  input  logic            head_is_load_i,
  input  logic            head_l2_miss_i,   // its access missed in L2 and is outstanding
  input  logic [MIDW-1:0] head_miss_id_i,
  input  logic [PCW-1:0]  head_pc_i,
  input  logic [PRW-1:0]  head_dest_i,
  // miss returns from the memory system
  input  logic            fill_valid_i,
  input  logic [MIDW-1:0] fill_id_i,
  // checkpoint restore finished
  input  logic            restore_done_i,
  // status and commands
  output ra_state_e       state_o,
  output logic            ra_mode_o,        // in runahead mode
  output logic            restore_o,        // flushed, checkpoint being restored
  output logic            enter_o,          // pulse: take checkpoint, invalidate head load
  output logic [PRW-1:0]  enter_dest_o,     // destination register to mark INV
  output logic            exit_o,           // pulse: flush thread, redirect fetch, restore
  output logic [PCW-1:0]  restart_pc_o      // PC of the blocking load
);

  ra_state_e       state_q, state_d;
  logic [MIDW-1:0] block_id_q;
  logic [PCW-1:0]  block_pc_q;

  // A miss whose data returns in the same cycle is not worth running ahead for.
  logic head_returning;
  assign head_returning = fill_valid_i && (fill_id_i == head_miss_id_i);

  always_comb begin
    state_d = state_q;
    enter_o = 1'b0;
    exit_o  = 1'b0;
    unique case (state_q)
      RS_NORMAL: begin
        if (head_valid_i && head_is_load_i && head_l2_miss_i && !head_returning) begin
          enter_o = 1'b1;
          state_d = RS_RUNAHEAD;
        end
      end
      RS_RUNAHEAD: begin
        if (fill_valid_i && fill_id_i == block_id_q) begin
          exit_o  = 1'b1;
          state_d = RS_RESTORE;
        end
      end
      RS_RESTORE: begin
        if (restore_done_i) state_d = RS_NORMAL;
      end
      default: state_d = RS_NORMAL;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= RS_NORMAL;
      block_id_q <= '0;
      block_pc_q <= '0;
    end else begin
      state_q <= state_d;
      if (enter_o) begin
        block_id_q <= head_miss_id_i;
        block_pc_q <= head_pc_i;
      end
    end
  end

  assign state_o      = state_q;
  assign ra_mode_o    = (state_q == RS_RUNAHEAD);
  assign restore_o    = (state_q == RS_RESTORE);
  assign enter_dest_o = head_dest_i;
  assign restart_pc_o = block_pc_q;

  // The blocking load is recorded only on entry, and entry happens only in NORMAL.
  a_enter_only_normal: assert property (@(posedge clk) disable iff (!rst_n)
    enter_o |-> state_q == RS_NORMAL);
  a_exit_only_runahead: assert property (@(posedge clk) disable iff (!rst_n)
    exit_o |-> state_q == RS_RUNAHEAD);

endmodule
