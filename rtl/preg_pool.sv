// preg_pool: shared pool of physical registers of one register file.
//
// The register file has a fixed total of NPREG physical registers shared by
// all threads. Each thread's NAREG architectural registers always occupy one
// physical register each, so THREADS*NAREG are held by architectural state
// and the rest form a common pool of rename registers (320 - 32*4 = 192 with
// the defaults). Any thread can take any free register; nothing is reserved
// per thread. A runahead thread frees its registers quickly because its
// invalid instructions pseudo-retire at once, which leaves more of the pool
// to the other threads.
//
// Operation: the pool is a free bit vector. At reset physical register
// t*NAREG + a holds architectural register a of thread t, and every other
// register is free. A rename group of one thread asks for up to WIDTH
// registers (alloc_req_i, one bit per lane); if at least that many are
// free (alloc_fit_o), each requesting lane gets a register, the
// lowest-numbered free ones in lane order, otherwise nothing is allocated
// and the group must stall. alloc_hold_i suppresses the allocation, so that
// a group needing registers of two files takes them only when both fit;
// alloc_ok_o = alloc_fit_o && !alloc_hold_i says the registers were taken. Up to WIDTH registers are freed per cycle
// (retirement of the instruction that overwrote the old mapping,
// pseudo-retirement, squash). A register freed in a cycle can be allocated
// from the next cycle on. used_o counts, per thread, the physical registers
// it holds, its architectural ones included.
//
// The fixed total with a shared rename pool follows the design description;
// the free-vector organisation, the all-or-nothing group allocation and the
// lowest-index-first order are this design's choices.
module preg_pool #(
  parameter int unsigned THREADS = 4,
  parameter int unsigned NPREG   = 320,
  parameter int unsigned NAREG   = 32,
  parameter int unsigned WIDTH   = 8,
  localparam int unsigned TW     = (THREADS > 1) ? $clog2(THREADS) : 1,
  localparam int unsigned PRW    = $clog2(NPREG),
  localparam int unsigned CNW    = $clog2(NPREG + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // allocation for one rename group
  input  logic [WIDTH-1:0]          alloc_req_i,
  input  logic [TW-1:0]             alloc_tid_i,
  input  logic                      alloc_hold_i,   // allocate nothing this cycle
  output logic                      alloc_fit_o,    // the group's request fits
  output logic                      alloc_ok_o,     // fits and not held: allocated
  output logic [WIDTH-1:0][PRW-1:0] alloc_preg_o,
  // release
  input  logic [WIDTH-1:0]          free_valid_i,
  input  logic [WIDTH-1:0][TW-1:0]  free_tid_i,
  input  logic [WIDTH-1:0][PRW-1:0] free_preg_i,
  // occupancy
  output logic [CNW-1:0]            free_count_o,
  output logic [THREADS-1:0][CNW-1:0] used_o
);

  logic [NPREG-1:0]            free_q, free_d;
  logic [CNW-1:0]              nfree_q, nfree_d;
  logic [THREADS-1:0][CNW-1:0] used_q, used_d;
  logic [CNW-1:0]              nreq;

  // Lane-ordered search for the lowest free registers.
  always_comb begin
    logic [NPREG-1:0] avail;
    logic             found;
    avail = free_q;
    found = 1'b0;
    nreq  = '0;
    for (int l = 0; l < WIDTH; l++) begin
      alloc_preg_o[l] = '0;
      if (alloc_req_i[l]) begin
        nreq  = nreq + 1'b1;
        found = 1'b0;
        for (int r = 0; r < NPREG; r++)
          if (!found && avail[r]) begin
            found           = 1'b1;
            alloc_preg_o[l] = PRW'(r);
            avail[r]        = 1'b0;
          end
      end
    end
    alloc_fit_o = (nreq <= nfree_q) && (32'(alloc_tid_i) < THREADS);
    alloc_ok_o  = alloc_fit_o && !alloc_hold_i;
  end

  always_comb begin
    free_d  = free_q;
    nfree_d = nfree_q;
    used_d  = used_q;
    if (alloc_ok_o)
      for (int l = 0; l < WIDTH; l++)
        if (alloc_req_i[l]) begin
          free_d[alloc_preg_o[l]] = 1'b0;
          nfree_d                 = nfree_d - 1'b1;
          used_d[alloc_tid_i]     = used_d[alloc_tid_i] + 1'b1;
        end
    for (int l = 0; l < WIDTH; l++)
      if (free_valid_i[l] && 32'(free_preg_i[l]) < NPREG && 32'(free_tid_i[l]) < THREADS) begin
        free_d[free_preg_i[l]] = 1'b1;
        nfree_d                = nfree_d + 1'b1;
        used_d[free_tid_i[l]]  = used_d[free_tid_i[l]] - 1'b1;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NPREG; r++) free_q[r] <= (r >= THREADS * NAREG);
      nfree_q <= CNW'(NPREG - THREADS * NAREG);
      for (int t = 0; t < THREADS; t++) used_q[t] <= CNW'(NAREG);
    end else begin
      free_q  <= free_d;
      nfree_q <= nfree_d;
      used_q  <= used_d;
    end
  end

  assign free_count_o = nfree_q;
  assign used_o       = used_q;

  // A register may only be freed while it is allocated.
  for (genvar l = 0; l < WIDTH; l++) begin : g_chk
    a_no_double_free: assert property (@(posedge clk) disable iff (!rst_n)
      free_valid_i[l] |-> !free_q[free_preg_i[l]]);
  end

endmodule
