// tb_drr_scheduler: drives the DRR scheduler of 4 queues from packet-length
// queues kept in the testbench and checks
//  * the DRR bound for every queue while it stays backlogged: after r completed
//    turns the bytes sent S satisfy r*Q - Lmax < S <= (r+1)*Q (Q = quantum bytes),
//  * long-run byte shares proportional to the quanta 1:2:3:4,
//  * nothing is sent while can_send is low, only backlogged queues are served,
//  * back-to-back service: one packet per cycle once a quantum has been added.
module tb_drr_scheduler;
  import hafq_pkg::*;
  localparam int NQ = 4, LMAX = 300;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NQ-1:0]    nonempty;
  logic [LEN_W-1:0] head_len;
  logic [BW_W-1:0]  quantum;
  logic             can_send = 1;
  logic [1:0]       cur_queue;
  logic             deq, rotate;

  drr_scheduler #(.NQ(NQ)) dut (.*);

  int pk [NQ][$];
  int qtab [NQ];
  longint sent [NQ];
  longint turns [NQ];

  // inputs seen by the scheduler, recomputed whenever the model or cur_queue changes
  task automatic drive();
    for (int k = 0; k < NQ; k++) nonempty[k] = (pk[k].size() != 0);
    head_len = (pk[cur_queue].size() != 0) ? LEN_W'(pk[cur_queue][0]) : '0;
    quantum  = BW_W'(qtab[cur_queue]);
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one clock: sample the decision before the edge, update the model after it
  bit d, r;
  int c;
  task automatic tick();
    drive();
    @(negedge clk);
    d = deq; r = rotate; c = int'(cur_queue);
    if (d) begin
      check(can_send, "deq while can_send low");
      check(pk[c].size() != 0, "deq of an empty queue");
    end
    @(posedge clk); #1;
    if (d) begin
      sent[c] += pk[c][0];
      void'(pk[c].pop_front());
    end
    if (r) turns[c]++;
    drive();
  endtask

  task automatic bound(input int k);
    longint q = 64 * qtab[k];
    check(sent[k] <= (turns[k] + 1) * q, $sformatf("q%0d sent %0d > (%0d+1)*%0d", k, sent[k], turns[k], q));
    check(sent[k] > turns[k] * q - LMAX, $sformatf("q%0d sent %0d too low, turns %0d", k, sent[k], turns[k]));
  endtask

  initial begin
    longint tot;
    int first, last, n;
    qtab = '{1, 2, 3, 4};
    foreach (sent[k]) begin sent[k] = 0; turns[k] = 0; end
    // Phase 0: back-to-back rate, one queue, big quantum
    for (int i = 0; i < 100; i++) pk[2].push_back(64);
    qtab[2] = 4095;
    drive();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    first = -1; last = -1; n = 0;
    for (int cyc = 0; cyc < 200; cyc++) begin
      tick();
      if (d) begin
        if (first < 0) first = cyc;
        last = cyc; n++;
      end
    end
    check(n == 100, $sformatf("sent %0d of 100", n));
    check(last - first == 99, $sformatf("100 packets took %0d cycles", last - first + 1));
    qtab[2] = 3;
    foreach (sent[k]) begin sent[k] = 0; turns[k] = 0; end
    // Phase 1: all queues backlogged, random lengths 64..300, random can_send
    for (int k = 0; k < NQ; k++) repeat (20) pk[k].push_back($urandom_range(64, LMAX));
    for (int cyc = 0; cyc < 60000; cyc++) begin
      can_send = ($urandom_range(0, 9) != 0);
      tick();
      for (int k = 0; k < NQ; k++) if (pk[k].size() < 10) pk[k].push_back($urandom_range(64, LMAX));
      if (cyc % 50 == 0) for (int k = 0; k < NQ; k++) bound(k);
    end
    tot = 0;
    for (int k = 0; k < NQ; k++) tot += sent[k];
    for (int k = 0; k < NQ; k++) begin
      automatic real share = real'(sent[k]) / real'(tot);
      automatic real want = real'(qtab[k]) / 10.0;
      check(share > want * 0.97 && share < want * 1.03, $sformatf("q%0d share %f want %f", k, share, want));
    end
    // Phase 2: bursts; every queue drains fully, then a new burst arrives
    can_send = 1;
    repeat (2000) tick();
    for (int b = 0; b < 50; b++) begin
      foreach (sent[k]) begin sent[k] = 0; turns[k] = 0; end
      for (int k = 0; k < NQ; k++) repeat ($urandom_range(1, 12)) pk[k].push_back($urandom_range(64, LMAX));
      for (int cyc = 0; cyc < 400; cyc++) begin
        tick();
        for (int k = 0; k < NQ; k++) if (pk[k].size() != 0) bound(k);
      end
      for (int k = 0; k < NQ; k++) check(pk[k].size() == 0, "burst drained");
    end
    // can_send low: nothing leaves
    pk[0].push_back(64);
    can_send = 0;
    n = 0;
    repeat (50) begin tick(); if (d) n++; end
    check(n == 0, "sent while blocked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
