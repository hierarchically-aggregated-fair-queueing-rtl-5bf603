// hafq_top: Hierarchically Aggregated Fair Queueing traffic manager.
//
// Many flows share NQ queues. Per packet descriptor (one per cycle, no
// back-pressure: a packet that cannot be kept is dropped and reported):
//   stage 1  the flow ID is hashed with a 16-bit CRC into a queue index and a
//            12-bit flow key, and the descriptor is registered;
//   stage 2  the queue's zombie list is searched and updated (Hit/Swap/No-swap),
//            the flow-count estimator of that queue updates its miss probability,
//            average arrival rate and estimated number of flows N, the
//            bandwidth allocator turns N into the queue's DRR quantum, and the
//            dropper either admits the packet into the shared buffer or drops it
//            (preferential drop of above-average flows in a long queue, or tail
//            drop). All of this is one read-modify-write in one cycle, so
//            consecutive packets of one queue never see stale state.
// On the output side a DRR scheduler serves the backlogged queues with the
// quanta set by the allocator, so a queue's share of the link follows the number
// of flows in it. The output is a registered valid/ready port carrying one
// descriptor per cycle at most.
// Observation: ing_* report what stage 2 did with each packet (ing_avg_upd only
// when ing_valid); drr_rotate and occupancy show the output side; mon_queue selects
// a queue whose estimation and scheduling words are shown on mon_est/mon_sched.
// The algorithm follows the HAFQ scheme; the pipeline, the descriptor format and
// every size not printed in the memory map are this design's choices.
module hafq_top
  import hafq_pkg::*;
#(
  parameter int unsigned NQ          = 64,
  parameter int unsigned M           = 4,
  parameter int unsigned Q_PROB      = 655,   // q = 0.01 (x 65536)
  parameter int unsigned ALPHA_SHIFT = 4,
  parameter int unsigned MISS_SHIFT  = 4,
  parameter int unsigned QPF         = 8,     // quantum per flow, 64-byte units
  parameter int unsigned BUF_PKTS    = 4096,
  parameter int unsigned QUEUE_CAP   = 255
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // packet input
  input  logic                  in_valid,
  input  pkt_desc_t             in_desc,
  // packet output
  output logic                  out_valid,
  input  logic                  out_ready,
  output pkt_desc_t             out_desc,
  // per-packet ingress report
  output logic                  ing_valid,
  output logic [$clog2(NQ)-1:0] ing_queue,
  output zl_event_e             ing_event,
  output drop_e                 ing_drop,
  output logic                  ing_avg_upd,   // the packet updated the average arrival rate
  output logic                  drr_rotate,    // DRR left a backlogged queue for lack of deficit
  output logic [$clog2(BUF_PKTS):0] occupancy, // descriptors held in the shared buffer
  // monitor
  input  logic [$clog2(NQ)-1:0] mon_queue,
  output est_word_t             mon_est,
  output sched_word_t           mon_sched
);
  localparam int unsigned QW = $clog2(NQ);

  // ---------------- stage 1: hash ----------------
  logic [15:0]        h_crc;
  logic [QW-1:0]      h_queue;
  logic [KEY_W-1:0]   h_key;

  crc16_hash #(.IN_W(FLOW_ID_W), .NQ(NQ), .KEY_W(KEY_W)) u_hash (
    .data(in_desc.flow_id), .crc(h_crc), .qidx(h_queue), .key(h_key)
  );

  logic             s1_valid;
  pkt_desc_t        s1_desc;
  logic [QW-1:0]    s1_queue;
  logic [KEY_W-1:0] s1_key;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_desc  <= '0;
      s1_queue <= '0;
      s1_key   <= '0;
    end else begin
      s1_valid <= in_valid;
      if (in_valid) begin
        s1_desc  <= in_desc;
        s1_queue <= h_queue;
        s1_key   <= h_key;
      end
    end
  end

  // ---------------- stage 2: zombie list, estimation, admission ----------------
  logic [RND_W-1:0] rnd_zl, rnd_est;
  lfsr_rng #(.SEED(32'h2545_F491)) u_rng_zl  (.clk, .rst_n, .rnd(rnd_zl));
  lfsr_rng #(.SEED(32'h9E37_79B9)) u_rng_est (.clk, .rst_n, .rnd(rnd_est));

  zl_event_e            zl_ev;
  logic [$clog2(M)-1:0] zl_row;
  logic [CNT_W-1:0]     zl_cnt, zl_evicted;
  logic [TOTAL_W-1:0]   zl_total;
  zombie_t              zl_dbg;

  zombie_list #(.NQ(NQ), .M(M), .Q_PROB(Q_PROB)) u_zombie (
    .clk, .rst_n,
    .req_valid(s1_valid), .req_queue(s1_queue), .req_key(s1_key), .rnd(rnd_zl),
    .ev(zl_ev), .row(zl_row), .cnt_new(zl_cnt), .evicted_cnt(zl_evicted),
    .total_new(zl_total),
    .dbg_queue(mon_queue), .dbg_row('0), .dbg_entry(zl_dbg)
  );

  logic [NFLOW_W-1:0] est_nflows;

  flow_estimator #(.NQ(NQ), .M(M), .Q_PROB(Q_PROB),
                   .ALPHA_SHIFT(ALPHA_SHIFT), .MISS_SHIFT(MISS_SHIFT)) u_est (
    .clk, .rst_n,
    .upd_valid(s1_valid), .upd_queue(s1_queue), .upd_ev(zl_ev),
    .evicted_cnt(zl_evicted), .total(zl_total), .rnd(rnd_est),
    .avg_upd(ing_avg_upd), .nflows(est_nflows),
    .dbg_queue(mon_queue), .dbg_word(mon_est)
  );

  // shared buffer
  logic [QW-1:0]             drr_queue;
  logic                      drr_deq;
  pkt_desc_t                 head_desc;
  logic [NQ-1:0][QLEN_W-1:0] qlen;
  logic [NQ-1:0]             nonempty;
  logic                      pool_full;
  logic                      drop;
  drop_e                     drop_reason;

  preferential_dropper #(.M(M), .QUEUE_CAP(QUEUE_CAP)) u_drop (
    .ev(zl_ev), .cnt_new(zl_cnt), .total_new(zl_total),
    .qlen(qlen[s1_queue]), .pool_full(pool_full),
    .drop(drop), .reason(drop_reason)
  );

  packet_buffer #(.NQ(NQ), .BUF_PKTS(BUF_PKTS)) u_buf (
    .clk, .rst_n,
    .enq_valid(s1_valid && !drop), .enq_queue(s1_queue), .enq_desc(s1_desc),
    .deq_valid(drr_deq), .deq_queue(drr_queue), .head_desc(head_desc),
    .qlen(qlen), .nonempty(nonempty), .pool_full(pool_full), .occupancy(occupancy)
  );

  // ---------------- dynamic bandwidth allocation and DRR ----------------
  logic [BW_W-1:0]    quantum;
  logic [NFLOW_W-1:0] mon_nflows;
  logic [BW_W-1:0]    mon_alloc;

  bandwidth_allocator #(.NQ(NQ), .QPF(QPF)) u_alloc (
    .clk, .rst_n,
    .wr_valid(s1_valid), .wr_queue(s1_queue), .wr_nflows(est_nflows),
    .rd_queue(drr_queue), .rd_alloc(quantum),
    .mon_queue(mon_queue), .mon_nflows(mon_nflows), .mon_alloc(mon_alloc)
  );

  logic can_send;
  assign can_send = !out_valid || out_ready;

  drr_scheduler #(.NQ(NQ)) u_drr (
    .clk, .rst_n,
    .nonempty(nonempty), .head_len(head_desc.len), .quantum(quantum),
    .can_send(can_send), .cur_queue(drr_queue), .deq(drr_deq), .rotate(drr_rotate)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_desc  <= '0;
    end else if (drr_deq) begin
      out_valid <= 1'b1;
      out_desc  <= head_desc;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

  // ---------------- reports ----------------
  assign ing_valid = s1_valid;
  assign ing_queue = s1_queue;
  assign ing_event = zl_ev;
  assign ing_drop  = s1_valid ? drop_reason : DROP_NONE;

  assign mon_sched = '{qlen: qlen[mon_queue], nflows: mon_nflows, alloc_bw: mon_alloc};

  // output handshake: a presented descriptor stays until taken
  property p_out_hold;
    @(posedge clk) disable iff (!rst_n) (out_valid && !out_ready) |=> (out_valid && $stable(out_desc));
  endproperty
  assert property (p_out_hold) else $error("hafq_top: output changed while stalled");
endmodule
