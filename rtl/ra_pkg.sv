// ra_pkg: shared types and constants of the runahead-thread support unit
// for a simultaneous multithreading (SMT) core.
//
// The default sizes follow the evaluated machine: 4 hardware threads, an
// 8-wide pipeline, 320 integer physical registers, 32 architectural
// registers per register file and a 512-entry shared reorder buffer. The
// 64-bit register width (Alpha ISA) and the instruction class encoding are
// this design's own choices.
package ra_pkg;

  // Instruction classes the runahead logic needs to tell apart.
  typedef enum logic [3:0] {
    IC_INT      = 4'd0,   // integer ALU / multiply
    IC_BRANCH   = 4'd1,   // control transfer
    IC_LOAD     = 4'd2,   // integer load
    IC_STORE    = 4'd3,   // integer store
    IC_FP       = 4'd4,   // floating-point computation
    IC_FP_LOAD  = 4'd5,   // load into an FP register
    IC_FP_STORE = 4'd6,   // store from an FP register
    IC_ACQUIRE  = 4'd7,   // lock acquire (enters a critical section)
    IC_RELEASE  = 4'd8,   // lock release (leaves a critical section)
    IC_NOP      = 4'd9
  } iclass_e;

  // What the decode filter does with an instruction.
  typedef enum logic [1:0] {
    DA_NORMAL  = 2'd0,   // dispatch and execute as usual
    DA_INVALID = 2'd1,   // dispatch marked invalid: not executed, pseudo-retired
    DA_DROP    = 2'd2,   // take no back-end resource at all
    DA_NODEST  = 2'd3    // execute the address only (prefetch), no destination register
  } daction_e;

  // Runahead controller states.
  typedef enum logic [1:0] {
    RS_NORMAL   = 2'd0,  // non-speculative execution
    RS_RUNAHEAD = 2'd1,  // speculative execution, pseudo-retirement
    RS_RESTORE  = 2'd2   // pipeline flushed, checkpoint being restored
  } ra_state_e;

endpackage
