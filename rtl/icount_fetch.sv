// icount_fetch: ICOUNT fetch thread selection.
//
// ICOUNT gives the fetch slot of a cycle to the thread with the fewest
// instructions in the front end and the issue queues, so that threads that
// clog the queues are fetched less. Runahead threads get no special
// priority: they are counted like normal threads, and since their invalid
// and dropped instructions leave the queues quickly they are naturally
// fetched more often than a stalled thread would be.
//
// The block keeps one counter per thread: it adds the instructions fetched
// for a thread (inc_*) and subtracts those that left the counted stages
// (dec_n_i: issued, dropped at decode or sent straight to pseudo-retirement);
// flush_i clears a thread's counter when its pipeline is flushed, and a
// flush wins over an add or subtract in the same cycle. Among the threads
// that are active and not stalled, the one with the smallest count is
// granted; ties go to the first thread after the one granted last (round
// robin). One thread is granted per cycle and may fetch up to WIDTH
// instructions. The grant is combinational from the counters; counters
// update at the clock edge. The counter width, the tie-break and the one
// thread per cycle are this design's choices.
module icount_fetch #(
  parameter int unsigned THREADS = 4,
  parameter int unsigned WIDTH   = 8,
  parameter int unsigned CW      = 10,   // counter width (ROB has 512 entries)
  localparam int unsigned TW     = (THREADS > 1) ? $clog2(THREADS) : 1,
  localparam int unsigned NW     = $clog2(WIDTH + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [THREADS-1:0]       active_i,   // context holds a running thread
  input  logic [THREADS-1:0]       stall_i,    // may not fetch this cycle
  input  logic                     inc_valid_i,
  input  logic [TW-1:0]            inc_tid_i,
  input  logic [NW-1:0]            inc_n_i,
  input  logic [THREADS-1:0][NW-1:0] dec_n_i,
  input  logic [THREADS-1:0]       flush_i,
  output logic                     grant_valid_o,
  output logic [TW-1:0]            grant_tid_o,
  output logic [THREADS-1:0][CW-1:0] count_o
);

  logic [THREADS-1:0][CW-1:0] cnt_q;
  logic [TW-1:0]              last_q;

  // Priority search: walk the threads starting after the last grant, keep
  // the first one with a strictly smaller count.
  always_comb begin
    logic [CW-1:0] best;
    int unsigned   t;
    grant_valid_o = 1'b0;
    grant_tid_o   = '0;
    best          = '1;
    for (int unsigned k = 1; k <= THREADS; k++) begin
      t = (32'(last_q) + k) % THREADS;
      if (active_i[t] && !stall_i[t] && (!grant_valid_o || cnt_q[t] < best)) begin
        grant_valid_o = 1'b1;
        grant_tid_o   = TW'(t);
        best          = cnt_q[t];
      end
    end
  end

  // Next counter values: add fetched, subtract departed (not below zero),
  // saturate at the top, clear on flush.
  logic [THREADS-1:0][CW-1:0] cnt_d;
  always_comb begin
    for (int t = 0; t < THREADS; t++) begin
      logic [CW:0] nxt;
      nxt = {1'b0, cnt_q[t]};
      if (inc_valid_i && inc_tid_i == TW'(t)) nxt = nxt + (CW+1)'(inc_n_i);
      nxt = (nxt > (CW+1)'(dec_n_i[t])) ? nxt - (CW+1)'(dec_n_i[t]) : '0;
      if (nxt[CW]) nxt = {1'b0, {CW{1'b1}}};
      cnt_d[t] = flush_i[t] ? '0 : nxt[CW-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q  <= '0;
      last_q <= TW'(THREADS - 1);
    end else begin
      cnt_q <= cnt_d;
      if (grant_valid_o) last_q <= grant_tid_o;
    end
  end

  assign count_o = cnt_q;

endmodule
