// zombie_list: the NQ zombie lists of the HAFQ scheme, one per queue, each a
// table of M entries {flow key, packet counter}.
//
// For a packet of queue `req_queue` with flow key `req_key` the list of that
// queue is searched in parallel:
//   Hit     - an entry holds the key: its counter is incremented (saturating at
//             2^CNT_W-1, since HAFQ leaves counter overflow to a separate mechanism
//             whose details are not published);
//   Swap    - no entry matches; a row chosen at random is overwritten with the new
//             key and counter 1, with probability q = Q_PROB/65536;
//   No-swap - otherwise nothing changes.
// The outputs describe the current request combinationally: the event, the row,
// the packet counter of the packet's flow after the update (0 on No-swap), the
// counter of the entry evicted by a Swap (the sample E used by the flow-count
// estimator) and the total of the M counters after the update. The table is
// written at the clock edge while req_valid is high, so one packet per cycle is
// handled with no hazard between consecutive packets. rnd[15:0] decides the swap,
// rnd[31:16] selects the row. An entry with counter 0 is empty and never hits.
// The pointer field of the entry is kept in the record but not used.
// The dbg_* port reads one entry for observation.
module zombie_list
  import hafq_pkg::*;
#(
  parameter int unsigned NQ     = 64,
  parameter int unsigned M      = 4,
  parameter int unsigned Q_PROB = 655   // q = 0.01 in units of 1/65536
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  req_valid,
  input  logic [$clog2(NQ)-1:0] req_queue,
  input  logic [KEY_W-1:0]      req_key,
  input  logic [RND_W-1:0]      rnd,
  output zl_event_e             ev,
  output logic [$clog2(M)-1:0]  row,
  output logic [CNT_W-1:0]      cnt_new,
  output logic [CNT_W-1:0]      evicted_cnt,
  output logic [TOTAL_W-1:0]    total_new,
  input  logic [$clog2(NQ)-1:0] dbg_queue,
  input  logic [$clog2(M)-1:0]  dbg_row,
  output zombie_t               dbg_entry
);
  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  zombie_t mem [NQ][M];
  zombie_t cur [M];
  zombie_t nxt [M];

  always_comb begin
    logic                 hit;
    logic [$clog2(M)-1:0] hit_row;
    logic [31:0]          rrow;
    logic [TOTAL_W+CNT_W-1:0] sum;
    hit     = 1'b0;
    hit_row = '0;
    for (int j = 0; j < M; j++) begin
      cur[j] = mem[req_queue][j];
      if (!hit && cur[j].count != '0 && cur[j].key == req_key) begin
        hit     = 1'b1;
        hit_row = j[$clog2(M)-1:0];
      end
    end
    rrow = 32'(rnd[31:16]) % 32'(M);
    nxt  = cur;
    evicted_cnt = '0;
    if (hit) begin
      ev      = ZL_HIT;
      row     = hit_row;
      cnt_new = (cur[hit_row].count == CNT_MAX) ? CNT_MAX : cur[hit_row].count + 1'b1;
      nxt[hit_row].count = cnt_new;
    end else if (32'(rnd[15:0]) < Q_PROB) begin
      ev          = ZL_SWAP;
      row         = rrow[$clog2(M)-1:0];
      cnt_new     = CNT_W'(1);
      evicted_cnt = cur[row].count;
      nxt[row]    = '{pointer: '0, count: CNT_W'(1), key: req_key};
    end else begin
      ev      = ZL_NOSWAP;
      row     = rrow[$clog2(M)-1:0];
      cnt_new = '0;
    end
    sum = '0;
    for (int j = 0; j < M; j++) sum += (TOTAL_W+CNT_W)'(nxt[j].count);
    total_new = (sum > (TOTAL_W+CNT_W)'({TOTAL_W{1'b1}})) ? '1 : sum[TOTAL_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NQ; k++)
        for (int j = 0; j < M; j++) mem[k][j] <= '0;
    end else if (req_valid) begin
      for (int j = 0; j < M; j++) mem[req_queue][j] <= nxt[j];
    end
  end

  assign dbg_entry = mem[dbg_queue][dbg_row];

  initial assert (M >= 2 && (1 << $clog2(M)) >= M) else $error("zombie_list: M must be at least 2");
endmodule
