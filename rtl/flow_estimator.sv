// flow_estimator: estimates the number of flows aggregated in each of NQ queues
// from the events of that queue's zombie list (HAFQ flow-count estimation).
//
// Per queue it keeps the estimation word {total of packet counters, average
// arrival rate, miss probability}. On every packet of queue k (upd_valid):
//   * miss probability (1-p) is an exponentially weighted average, weight
//     2^-MISS_SHIFT, of the packet's miss indicator (1 unless the event was Hit);
//   * on a Swap that evicts a counter E >= 2 the average arrival rate is updated by
//       A <- (1 - c) A' + alpha E,   c = alpha/(1-p) * E/(E-1),   alpha = 2^-ALPHA_SHIFT
//     which is the HAFQ weighted average of R_i = (1-p)(q/M)(E-1) with weight
//     beta E/R_i, alpha = beta M / q, expressed in units of q/M (A = R_avg * M/q);
//     c is limited to 1;
//   * the number of flows N = 1/R_avg = (M/q)/A is recomputed and output
//     (rounded, limited to 1..4095).
// The stored average is unsigned 10.2 and the miss probability counts 1/256; both
// are rounded with random low bits from rnd so that small updates are not lost.
// Evictions of E <= 1 carry no rate information (R_i = 0, infinite weight) and do
// not update the average; empty entries evict E = 0. These scalings, the weights
// and the handling of E <= 1 are this design's choices.
// Timing: outputs for the current request are combinational; the word of queue k
// is written at the clock edge, so one packet per cycle is handled. After reset a
// queue reads miss probability 255/256, total 0 and an average that gives N = 1.
module flow_estimator
  import hafq_pkg::*;
#(
  parameter int unsigned NQ          = 64,
  parameter int unsigned M           = 4,
  parameter int unsigned Q_PROB      = 655,  // q = 0.01 in units of 1/65536
  parameter int unsigned ALPHA_SHIFT = 4,
  parameter int unsigned MISS_SHIFT  = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  upd_valid,
  input  logic [$clog2(NQ)-1:0] upd_queue,
  input  zl_event_e             upd_ev,
  input  logic [CNT_W-1:0]      evicted_cnt,
  input  logic [TOTAL_W-1:0]    total,
  input  logic [RND_W-1:0]      rnd,
  output logic                  avg_upd,     // this packet updated the average
  output logic [NFLOW_W-1:0]    nflows,      // N of upd_queue after this packet
  input  logic [$clog2(NQ)-1:0] dbg_queue,
  output est_word_t             dbg_word
);
  localparam logic [NFLOW_W-1:0] NF_MAX = '1;
  localparam logic [AVG_W-1:0]   AVG_MAX = '1;
  // M/q in units of the average's LSB: M * 2^16 / Q_PROB * 2^AVG_FRAC
  localparam longint unsigned NUM = longint'(M) << (16 + AVG_FRAC);
  localparam longint unsigned AINIT_L = NUM / 64'(Q_PROB);
  localparam logic [AVG_W-1:0] A_INIT = (AINIT_L > 64'(AVG_MAX)) ? AVG_MAX : AVG_W'(AINIT_L);
  localparam int unsigned AFR = 16 + AVG_FRAC;  // fraction bits of the update

  est_word_t mem [NQ];
  est_word_t cur, nxt;

  always_comb begin
    logic [MISS_W+MISS_SHIFT:0] macc;
    logic [MISS_W-1:0]          mnew;
    logic [MISS_W-1:0]          mden;
    logic [63:0]                cnum, cden, c16;
    logic [63:0]                acc, anew;
    logic [63:0]                nq;
    nq   = '0;
    cur  = mem[upd_queue];
    nxt  = cur;
    // miss probability: m <- m (1 - 2^-s) + x 2^-s
    macc = (MISS_W+MISS_SHIFT+1)'(cur.miss_prob) * (MISS_W+MISS_SHIFT+1)'((1 << MISS_SHIFT) - 1)
         + ((upd_ev != ZL_HIT) ? (MISS_W+MISS_SHIFT+1)'(255) : '0)
         + (MISS_W+MISS_SHIFT+1)'(rnd[16 +: MISS_SHIFT]);
    mnew = MISS_W'(macc >> MISS_SHIFT);
    nxt.miss_prob = mnew;
    nxt.total     = total;
    // average arrival rate
    avg_upd = (upd_ev == ZL_SWAP) && (evicted_cnt >= CNT_W'(2));
    mden    = (mnew == '0) ? MISS_W'(1) : mnew;
    cnum    = 64'(evicted_cnt) << (24 - ALPHA_SHIFT);
    cden    = 64'(mden) * (64'(evicted_cnt) - 64'd1);
    c16     = (cden == 0) ? 64'd65536 : cnum / cden;
    if (c16 > 64'd65536) c16 = 64'd65536;
    acc  = (64'(cur.avg_rate) << 16) - 64'(cur.avg_rate) * c16
         + (64'(evicted_cnt) << (AFR - ALPHA_SHIFT)) + 64'(rnd[15:0]);
    anew = acc >> 16;
    if (avg_upd) nxt.avg_rate = (anew > 64'(AVG_MAX)) ? AVG_MAX : AVG_W'(anew);
    // N = (M/q) / A, rounded
    if (nxt.avg_rate == '0) nflows = NF_MAX;
    else begin
      nq = (64'(NUM) + 64'(Q_PROB) * 64'(nxt.avg_rate) / 2) / (64'(Q_PROB) * 64'(nxt.avg_rate));
      if (nq > 64'(NF_MAX)) nflows = NF_MAX;
      else if (nq == 0)     nflows = NFLOW_W'(1);
      else                  nflows = NFLOW_W'(nq);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NQ; k++) mem[k] <= '{total: '0, avg_rate: A_INIT, miss_prob: 8'd255};
    end else if (upd_valid) begin
      mem[upd_queue] <= nxt;
    end
  end

  assign dbg_word = mem[dbg_queue];

  initial assert (ALPHA_SHIFT >= 1 && ALPHA_SHIFT <= 16 && MISS_SHIFT >= 1 && MISS_SHIFT <= 8)
    else $error("flow_estimator: shift parameters out of range");
endmodule
