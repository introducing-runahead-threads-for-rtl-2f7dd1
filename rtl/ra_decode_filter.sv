// ra_decode_filter: decode-stage treatment of instructions of runahead threads.
//
// A runahead thread should take as few shared resources as possible:
//  * Floating-point computations are not needed to compute load addresses,
//    so a runahead thread drops them after decode (DA_DROP): they take no
//    queue entry, register or functional unit.
//  * Lock acquire and release instructions are ignored (DA_DROP), and every
//    instruction inside a critical section is marked invalid (DA_INVALID),
//    so a thread running ahead never changes data shared with other threads.
//  * FP loads and stores keep their integer address computation as a
//    prefetch but get no FP destination (DA_NODEST).
// Threads in normal mode get DA_NORMAL for everything.
//
// To know whether an instruction lies inside a critical section, the block
// keeps, per thread, the lock nesting depth of committed acquire/release
// pairs. On entry to runahead mode that depth is copied into a speculative
// depth, which decoded acquires and releases then move. Within a decode
// group of WIDTH instructions (all from one thread, as one thread is fetched
// per cycle), a lane sees the depth left by the lanes before it. Dropping FP
// work and ignoring synchronisation follow the design description; the
// depth counters, DA_NODEST for FP memory operations and the saturating
// CSW-bit depth are this design's choices. dec_action_o is combinational;
// the depths update at the clock edge.
module ra_decode_filter
  import ra_pkg::*;
#(
  parameter int unsigned THREADS = 4,
  parameter int unsigned WIDTH   = 8,
  parameter int unsigned CSW     = 4,    // lock depth counter width
  localparam int unsigned TW     = (THREADS > 1) ? $clog2(THREADS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [THREADS-1:0]       ra_mode_i,    // thread is in runahead mode
  input  logic [THREADS-1:0]       ra_enter_i,   // thread enters runahead this cycle
  // decode group
  input  logic [WIDTH-1:0]         dec_valid_i,
  input  logic [TW-1:0]            dec_tid_i,
  input  iclass_e [WIDTH-1:0]      dec_class_i,
  output daction_e [WIDTH-1:0]     dec_action_o,
  // commits in normal mode (only the class matters here)
  input  logic [WIDTH-1:0]         cm_valid_i,
  input  logic [WIDTH-1:0][TW-1:0] cm_tid_i,
  input  iclass_e [WIDTH-1:0]      cm_class_i
);

  logic [THREADS-1:0][CSW-1:0] cdepth_q, cdepth_d;   // committed depth
  logic [THREADS-1:0][CSW-1:0] sdepth_q, sdepth_d;   // speculative depth
  logic [CSW-1:0]              d;
  logic                        ra;

  function automatic logic [CSW-1:0] inc_sat(input logic [CSW-1:0] v);
    return (v == '1) ? v : v + 1'b1;
  endfunction
  function automatic logic [CSW-1:0] dec_sat(input logic [CSW-1:0] v);
    return (v == '0) ? v : v - 1'b1;
  endfunction

  // decode side
  always_comb begin
    sdepth_d = sdepth_q;
    ra       = (32'(dec_tid_i) < THREADS) && ra_mode_i[dec_tid_i];
    d        = (32'(dec_tid_i) < THREADS) ? sdepth_q[dec_tid_i] : '0;
    for (int l = 0; l < WIDTH; l++) begin
      dec_action_o[l] = DA_NORMAL;
      if (dec_valid_i[l] && ra) begin
        unique case (dec_class_i[l])
          IC_ACQUIRE:  begin dec_action_o[l] = DA_DROP; d = inc_sat(d); end
          IC_RELEASE:  begin dec_action_o[l] = DA_DROP; d = dec_sat(d); end
          IC_FP:       dec_action_o[l] = DA_DROP;
          IC_FP_LOAD,
          IC_FP_STORE: dec_action_o[l] = (d != '0) ? DA_INVALID : DA_NODEST;
          default:     dec_action_o[l] = (d != '0) ? DA_INVALID : DA_NORMAL;
        endcase
      end
    end
    if (ra) sdepth_d[dec_tid_i] = d;
    // entering runahead: start from the committed depth
    for (int t = 0; t < THREADS; t++)
      if (ra_enter_i[t]) sdepth_d[t] = cdepth_d[t];
  end

  // commit side: only normal-mode commits are architectural
  always_comb begin
    cdepth_d = cdepth_q;
    for (int l = 0; l < WIDTH; l++)
      if (cm_valid_i[l] && 32'(cm_tid_i[l]) < THREADS && !ra_mode_i[cm_tid_i[l]]) begin
        if (cm_class_i[l] == IC_ACQUIRE) cdepth_d[cm_tid_i[l]] = inc_sat(cdepth_d[cm_tid_i[l]]);
        if (cm_class_i[l] == IC_RELEASE) cdepth_d[cm_tid_i[l]] = dec_sat(cdepth_d[cm_tid_i[l]]);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cdepth_q <= '0;
      sdepth_q <= '0;
    end else begin
      cdepth_q <= cdepth_d;
      sdepth_q <= sdepth_d;
    end
  end

endmodule
