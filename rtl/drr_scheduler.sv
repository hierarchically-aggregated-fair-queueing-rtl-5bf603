// drr_scheduler: deficit round robin over NQ queues, each with its own quantum.
//
// The scheduler visits backlogged queues in index order (round robin). On
// arriving at a queue it adds the queue's quantum (in QUANTUM_UNIT-byte units)
// to the queue's deficit counter; it then sends the head packet for as long as
// the head packet's length does not exceed the deficit, subtracting each length;
// when the head packet is longer it moves on to the next backlogged queue and
// keeps the remaining deficit. A queue found empty gets its deficit cleared.
// This is the DRR discipline HAFQ builds on; visiting queues in index order instead of
// keeping a list of active queues is this design's choice.
// Timing: one action per cycle - add a quantum, send one packet, or move on.
// cur_queue selects the queue whose head length (head_len) and quantum the
// caller presents combinationally; deq is a one-cycle strobe that removes the
// head packet of cur_queue and is only raised while can_send is high. rotate
// pulses when the scheduler leaves a backlogged queue for lack of deficit.
module drr_scheduler
  import hafq_pkg::*;
#(
  parameter int unsigned NQ    = 64,
  parameter int unsigned DEF_W = 20
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NQ-1:0]         nonempty,
  input  logic [LEN_W-1:0]      head_len,
  input  logic [BW_W-1:0]       quantum,
  input  logic                  can_send,
  output logic [$clog2(NQ)-1:0] cur_queue,
  output logic                  deq,
  output logic                  rotate
);
  localparam int unsigned QW = $clog2(NQ);

  logic [DEF_W-1:0] deficit [NQ];
  logic             fresh;
  logic [QW-1:0]    next_q;
  logic             any;

  // next backlogged queue after cur_queue, cur_queue itself last
  always_comb begin
    logic [31:0] idx;
    next_q = cur_queue;
    any    = 1'b0;
    for (int i = NQ; i >= 1; i--) begin
      idx = (32'(cur_queue) + 32'(i)) % 32'(NQ);
      if (nonempty[idx[QW-1:0]]) begin
        next_q = idx[QW-1:0];
        any    = 1'b1;
      end
    end
  end

  logic serve, send;
  always_comb begin
    serve  = nonempty[cur_queue] && !fresh;
    send   = serve && (DEF_W'(head_len) <= deficit[cur_queue]);
    deq    = send && can_send;
    rotate = serve && !send;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NQ; k++) deficit[k] <= '0;
      cur_queue <= '0;
      fresh     <= 1'b1;
    end else if (!nonempty[cur_queue]) begin
      deficit[cur_queue] <= '0;
      if (any) cur_queue <= next_q;
      fresh <= 1'b1;
    end else if (fresh) begin
      deficit[cur_queue] <= deficit[cur_queue] + DEF_W'(32'(quantum) * QUANTUM_UNIT);
      fresh <= 1'b0;
    end else if (send) begin
      if (can_send) deficit[cur_queue] <= deficit[cur_queue] - DEF_W'(head_len);
    end else begin
      cur_queue <= next_q;
      fresh     <= 1'b1;
    end
  end

  initial assert (DEF_W >= BW_W + $clog2(QUANTUM_UNIT) + 1 && DEF_W > LEN_W)
    else $error("drr_scheduler: DEF_W too small");
endmodule
