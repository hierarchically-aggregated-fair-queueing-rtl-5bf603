// packet_buffer: shared buffer pool of BUF_PKTS packet descriptors, organised as
// NQ FIFO queues kept as linked lists.
//
// Every queue has a head pointer, a tail pointer and a length; a next-pointer
// memory links the slots of one queue. Free slots are handed out first from a
// FIFO of returned slots and, while the pool has never been full, from a counter
// of untouched slots, so no memory needs clearing at reset. One enqueue and one
// dequeue can happen in the same cycle, also on the same queue. The caller must
// not enqueue when pool_full is set or the queue is at its limit, and must not
// dequeue an empty queue (both are asserted). A shared pool follows the
// shared packet buffer of the HAFQ router; its size and the linked-list organisation are
// this design's choices.
// Timing: head_desc (head of deq_queue) and the length vector are combinational
// reads of the state; enqueue and dequeue take effect at the clock edge.
module packet_buffer
  import hafq_pkg::*;
#(
  parameter int unsigned NQ       = 64,
  parameter int unsigned BUF_PKTS = 4096
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       enq_valid,
  input  logic [$clog2(NQ)-1:0]      enq_queue,
  input  pkt_desc_t                  enq_desc,
  input  logic                       deq_valid,
  input  logic [$clog2(NQ)-1:0]      deq_queue,
  output pkt_desc_t                  head_desc,
  output logic [NQ-1:0][QLEN_W-1:0]  qlen,
  output logic [NQ-1:0]              nonempty,
  output logic                       pool_full,
  output logic [$clog2(BUF_PKTS):0]  occupancy
);
  localparam int unsigned IW = $clog2(BUF_PKTS);
  typedef logic [IW-1:0] idx_t;

  pkt_desc_t desc_mem [BUF_PKTS];
  idx_t      next_mem [BUF_PKTS];
  idx_t      free_mem [BUF_PKTS];
  idx_t      head [NQ];
  idx_t      tail [NQ];
  logic [IW:0] free_rd, free_wr, free_cnt, fresh;

  idx_t slot, deq_slot;
  logic use_free;

  always_comb begin
    use_free  = (free_cnt != '0);
    slot      = use_free ? free_mem[free_rd[IW-1:0]] : fresh[IW-1:0];
    pool_full = !use_free && (fresh == (IW+1)'(BUF_PKTS));
    deq_slot  = head[deq_queue];
    head_desc = desc_mem[deq_slot];
    for (int k = 0; k < NQ; k++) nonempty[k] = (qlen[k] != '0);
  end

  always_ff @(posedge clk) begin
    if (enq_valid) begin
      desc_mem[slot] <= enq_desc;
      if (qlen[enq_queue] != '0) next_mem[tail[enq_queue]] <= slot;
    end
    if (deq_valid) free_mem[free_wr[IW-1:0]] <= deq_slot;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NQ; k++) begin
        head[k] <= '0;
        tail[k] <= '0;
        qlen[k] <= '0;
      end
      free_rd   <= '0;
      free_wr   <= '0;
      free_cnt  <= '0;
      fresh     <= '0;
      occupancy <= '0;
    end else begin
      // dequeue
      if (deq_valid) begin
        head[deq_queue] <= next_mem[deq_slot];
        free_wr <= (free_wr[IW-1:0] == IW'(BUF_PKTS - 1)) ? '0 : free_wr + 1'b1;
      end
      // enqueue (overrides the head update when the queue holds one packet)
      if (enq_valid) begin
        tail[enq_queue] <= slot;
        if (qlen[enq_queue] == '0 ||
            (deq_valid && deq_queue == enq_queue && qlen[enq_queue] == QLEN_W'(1)))
          head[enq_queue] <= slot;
        if (use_free) free_rd <= (free_rd[IW-1:0] == IW'(BUF_PKTS - 1)) ? '0 : free_rd + 1'b1;
        else          fresh   <= fresh + 1'b1;
      end
      // lengths
      if (enq_valid && deq_valid && enq_queue == deq_queue) begin
        // unchanged
      end else begin
        if (enq_valid) qlen[enq_queue] <= qlen[enq_queue] + 1'b1;
        if (deq_valid) qlen[deq_queue] <= qlen[deq_queue] - 1'b1;
      end
      free_cnt  <= free_cnt  + (IW+1)'(deq_valid) - (IW+1)'(enq_valid && use_free);
      occupancy <= occupancy + (IW+1)'(enq_valid) - (IW+1)'(deq_valid);
    end
  end

  a_enq_room: assert property (@(posedge clk) disable iff (!rst_n) !(enq_valid && pool_full))
    else $error("packet_buffer: enqueue into a full pool");
  a_qlen_ovf: assert property (@(posedge clk) disable iff (!rst_n) !(enq_valid && qlen[enq_queue] == '1))
    else $error("packet_buffer: queue length overflow");
  a_deq_data: assert property (@(posedge clk) disable iff (!rst_n) !(deq_valid && qlen[deq_queue] == '0))
    else $error("packet_buffer: dequeue of an empty queue");

  initial assert ((1 << $clog2(BUF_PKTS)) == BUF_PKTS) else $error("packet_buffer: BUF_PKTS must be a power of two");
endmodule
