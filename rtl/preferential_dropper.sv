// preferential_dropper: admission decision for one arriving packet.
//
// HAFQ drops an arriving packet when the packet counter of its flow in the zombie
// list exceeds the average counter of that list and the queue is longer than
// half of its capacity; such flows are the ones arriving faster than the others
// in the same queue. The average is compared without division:
// count > total/M  <=>  count*M > total. Only a Hit carries a counter of the
// packet's own flow, so only a Hit can cause a preferential drop (a flow just
// swapped in has counter 1). Beyond that, the packet is tail-dropped when its
// queue holds QUEUE_CAP packets or the shared buffer pool is full.
// "Capacity" is read as the per-queue limit QUEUE_CAP; the tail-drop rules are
// this design's. Purely combinational.
module preferential_dropper
  import hafq_pkg::*;
#(
  parameter int unsigned M         = 4,
  parameter int unsigned QUEUE_CAP = 255
) (
  input  zl_event_e          ev,
  input  logic [CNT_W-1:0]   cnt_new,
  input  logic [TOTAL_W-1:0] total_new,
  input  logic [QLEN_W-1:0]  qlen,
  input  logic               pool_full,
  output logic               drop,
  output drop_e              reason
);
  logic above_avg, long_queue;

  always_comb begin
    above_avg  = (ev == ZL_HIT) &&
                 ((32'(cnt_new) * 32'(M)) > 32'(total_new));
    long_queue = 32'(qlen) > (32'(QUEUE_CAP) / 2);
    if (above_avg && long_queue)          reason = DROP_PREF;
    else if (32'(qlen) >= 32'(QUEUE_CAP)) reason = DROP_QFULL;
    else if (pool_full)                   reason = DROP_POOL;
    else                                  reason = DROP_NONE;
    drop = (reason != DROP_NONE);
  end

  initial assert (QUEUE_CAP >= 2 && QUEUE_CAP < (1 << QLEN_W))
    else $error("preferential_dropper: QUEUE_CAP must fit the queue length field");
endmodule
