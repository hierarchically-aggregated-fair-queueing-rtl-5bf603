// tb_packet_buffer: random enqueues and dequeues on 4 queues sharing a pool of
// 16 descriptors, compared with one FIFO model per queue: head descriptor,
// lengths, non-empty flags, occupancy and the pool-full flag. Includes
// simultaneous enqueue and dequeue on the same queue, a full pool and draining.
module tb_packet_buffer;
  import hafq_pkg::*;
  localparam int NQ = 4, BP = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                     enq_valid = 0, deq_valid = 0;
  logic [1:0]               enq_queue = 0, deq_queue = 0;
  pkt_desc_t                enq_desc = '0, head_desc;
  logic [NQ-1:0][QLEN_W-1:0] qlen;
  logic [NQ-1:0]            nonempty;
  logic                     pool_full;
  logic [4:0]               occupancy;

  packet_buffer #(.NQ(NQ), .BUF_PKTS(BP)) dut (.*);

  pkt_desc_t model [NQ][$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int held();
    int n = 0;
    for (int k = 0; k < NQ; k++) n += model[k].size();
    return n;
  endfunction

  task automatic compare();
    for (int k = 0; k < NQ; k++) begin
      check(int'(qlen[k]) == model[k].size(), $sformatf("qlen q%0d got %0d exp %0d", k, qlen[k], model[k].size()));
      check(nonempty[k] == (model[k].size() != 0), "nonempty");
    end
    check(int'(occupancy) == held(), "occupancy");
    check(pool_full == (held() == BP), $sformatf("pool_full %0d held %0d", pool_full, held()));
  endtask

  int n_same = 0, n_full = 0;

  task automatic cycle(input int pe, input int pd);
    automatic int eq = $urandom_range(0, NQ - 1);
    automatic int dq = $urandom_range(0, NQ - 1);
    automatic bit do_deq = ($urandom_range(0, 99) < pd) && model[dq].size() != 0;
    automatic bit do_enq = ($urandom_range(0, 99) < pe) && !pool_full;
    if ($urandom_range(0, 3) == 0) eq = dq;
    deq_valid = do_deq; deq_queue = 2'(dq);
    enq_valid = do_enq; enq_queue = 2'(eq);
    enq_desc  = '{flow_id: $urandom, len: 16'($urandom), handle: 16'($urandom)};
    #1;
    if (do_deq) check(head_desc == model[dq][0], $sformatf("head q%0d", dq));
    if (do_deq && do_enq && eq == dq) n_same++;
    if (pool_full) n_full++;
    @(posedge clk); #1;
    if (do_deq) void'(model[dq].pop_front());
    if (do_enq) model[eq].push_back(enq_desc);
    deq_valid = 0; enq_valid = 0;
    compare();
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    compare();
    repeat (3000) cycle(60, 40);   // fill
    repeat (3000) cycle(50, 50);
    repeat (3000) cycle(30, 70);   // drain
    repeat (2000) cycle(70, 70);
    repeat (200)  cycle(0, 100);
    check(held() == 0 || occupancy == 5'(held()), "drained");
    check(n_same > 50 && n_full > 50, $sformatf("coverage same=%0d full=%0d", n_same, n_full));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
