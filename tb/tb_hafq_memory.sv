// tb_hafq_memory: fairness of the complete traffic manager in small
// configurations, where HAFQ state must fit in a few hundred bytes.
//   * Flow sweep: 16 queues with 2 zombie entries each, carrying 16, 32, 48,
//     64, 80 and 96 flows.
//   * Memory sweep, 96 flows throughout:
//       - more queues: 8, 16 and 24 queues with 2 entries each;
//       - longer lists: 8 queues with 2 to 10 entries each.
//     Per-queue HAFQ state is 32*Q*(2+M) bits, so both sweeps cover 128 to
//     384 bytes.
// Each configuration is a separate hafq_top instance. Its parameters are set
// from a table, and the instances run one after another.
// Traffic: 512-byte packets, one per cycle in total, from a flow picked at
// random. Either all flows have the same rate, or half of them send three
// times faster. The output takes a packet every other cycle on average, so the
// link is overloaded twice.
// During the measurement window the testbench:
//   * samples every queue's flow estimate through the monitor port and
//     compares its mean with the number of flows hashed to that queue, using a
//     bit-wise reference CRC;
//   * records the bytes each flow receives and computes the fairness index
//     f = (sum x)^2 / (n sum x^2).
// Checks:
//   * f stays above a floor;
//   * for equal-rate flows and lists of up to 6 entries, f beats the index
//     that an equal share per backlogged queue would give for the same
//     hashing. Longer lists hold nearly all 12 flows of a queue. The few flows
//     left outside are never dropped preferentially, so they get more than
//     their share, and f falls toward that baseline;
//   * for equal-rate flows, the mean estimate error stays within 30 %;
//   * every admitted packet leaves.
// The flow counts, queue counts and list sizes are those of the network
// processor experiments of the HAFQ scheme. The open-loop senders, the
// factor-two overload and the thresholds are this testbench's own choices.
// With open-loop senders, flows of equal rate already share a queue evenly, so
// adding memory does not raise f here the way it does with TCP senders. The
// printed table shows the values.
module tb_hafq_memory;
  import hafq_pkg::*;
  localparam int WARM = 60000, MEAS = 120000;
  localparam int NCFG = 11;
  localparam int CFG_NQ [NCFG] = '{16, 8, 24, 8, 8, 8, 8, 8, 8, 8, 8};
  localparam int CFG_M  [NCFG] = '{ 2, 2,  2, 3, 4, 5, 6, 7, 8, 9, 10};

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (32 * (WARM + MEAS + 20000) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] ids [96];
  int          turn = -1;

  // reference CRC-16/CCITT (polynomial 0x1021, initial value 0xFFFF), bit by bit
  function automatic int ref_queue(input logic [31:0] id, input int nq);
    logic [15:0] c = 16'hFFFF;
    for (int i = 31; i >= 0; i--) begin
      logic fb = c[15] ^ id[i];
      c = {c[14:0], 1'b0};
      if (fb) c ^= 16'h1021;
    end
    return int'(c) % nq;
  endfunction

  for (genvar g = 0; g < NCFG; g++) begin : cfg
    localparam int NQ = CFG_NQ[g];
    localparam int M  = CFG_M[g];
    logic                  rst_n = 0;
    logic                  in_valid = 0;
    pkt_desc_t             in_desc = '0;
    logic                  out_valid, out_ready = 0;
    pkt_desc_t             out_desc;
    logic                  ing_valid, ing_avg_upd, drr_rotate;
    logic [$clog2(NQ)-1:0] ing_queue, mon_queue = '0;
    zl_event_e             ing_event;
    drop_e                 ing_drop;
    logic [12:0]           occupancy;
    est_word_t             mon_est;
    sched_word_t           mon_sched;

    hafq_top #(.NQ(NQ), .M(M)) dut (.*);

    longint got [logic [31:0]];
    bit     measure;
    int     n_acc, n_out, n_avg;

    always @(posedge clk) begin
      if (rst_n) begin
        if (out_valid && out_ready) begin
          n_out++;
          if (measure) begin
            if (got.exists(out_desc.flow_id)) got[out_desc.flow_id] += out_desc.len;
            else got[out_desc.flow_id] = out_desc.len;
          end
        end
        if (ing_valid && ing_drop == DROP_NONE) n_acc++;
        if (ing_valid && ing_avg_upd) n_avg++;
      end
    end

    task automatic run(input int nf, input int fast_weight, input real fmin, output real f);
      real s, s2, e, e2, x, err;
      int  per_q [NQ];
      longint est_sum [NQ];
      int  est_n [NQ];
      int  busy, total_w, pick, w;
      got.delete();
      est_sum = '{default: 0};
      est_n = '{default: 0};
      total_w = 0;
      for (int i = 0; i < nf; i++) total_w += (i % 2 == 1) ? fast_weight : 1;
      n_acc = 0; n_out = 0; n_avg = 0;
      measure = 0;
      rst_n = 0;
      repeat (3) @(posedge clk);
      #1 rst_n = 1;
      for (int c = 0; c < WARM + MEAS; c++) begin
        @(negedge clk);
        if (c == WARM) measure = 1;
        pick = $urandom_range(0, total_w - 1);
        w = 0;
        for (int i = 0; i < nf; i++) begin
          w += (i % 2 == 1) ? fast_weight : 1;
          if (pick < w) begin
            in_desc = '{flow_id: ids[i], len: 16'd512, handle: 16'(c)};
            break;
          end
        end
        in_valid  = 1;
        out_ready = $urandom_range(0, 1);
        mon_queue = ($clog2(NQ))'(c % NQ);
        #1;
        if (measure) begin
          est_sum[c % NQ] += mon_sched.nflows;
          est_n[c % NQ]++;
        end
      end
      @(negedge clk);
      in_valid  = 0;
      measure   = 0;
      out_ready = 1;
      for (int c = 0; c < 20000 && (occupancy != 0 || out_valid); c++) @(negedge clk);
      @(negedge clk);
      s = 0; s2 = 0;
      for (int i = 0; i < nf; i++) begin
        x = got.exists(ids[i]) ? real'(got[ids[i]]) : 0.0;
        s += x; s2 += x * x;
      end
      f = s * s / (real'(nf) * s2);
      // equal share per backlogged queue: a flow gets 1/(busy queues * flows in its queue)
      per_q = '{default: 0};
      for (int i = 0; i < nf; i++) per_q[ref_queue(ids[i], NQ)]++;
      busy = 0;
      for (int q = 0; q < NQ; q++) if (per_q[q] != 0) busy++;
      e = 0; e2 = 0;
      for (int i = 0; i < nf; i++) begin
        x = 1.0 / (real'(busy) * real'(per_q[ref_queue(ids[i], NQ)]));
        e += x; e2 += x * x;
      end
      err = 0;
      for (int q = 0; q < NQ; q++)
        if (per_q[q] != 0) err += (real'(est_sum[q]) / real'(est_n[q]) - real'(per_q[q])) / real'(per_q[q]) / real'(busy);
      $display("%0d queues, M = %0d, %0d flows, weight %0d (%0d bytes): fairness index %f, equal share per queue %f, mean estimate error %f",
               NQ, M, nf, fast_weight, 4 * NQ * (2 + M), f, e * e / (real'(nf) * e2), err);
      check(f >= fmin, $sformatf("Q=%0d M=%0d %0d flows: fairness %f below %f", NQ, M, nf, f, fmin));
      if (fast_weight == 1) begin
        if (nf > NQ && M <= 6)
          check(f > e * e / (real'(nf) * e2),
                $sformatf("Q=%0d M=%0d %0d flows: no better than equal share per queue", NQ, M, nf));
        check(err > -0.3 && err < 0.3,
              $sformatf("Q=%0d M=%0d %0d flows: mean estimate error %f", NQ, M, nf, err));
      end
      check(n_out == n_acc && occupancy == 0, $sformatf("delivered %0d of %0d admitted", n_out, n_acc));
      check(n_avg > 0, "estimator updated its average");
    endtask

    initial begin
      real f;
      wait (turn == g);
      if (g == 0) begin
        for (int nf = 16; nf < 96; nf += 16) run(nf, 1, 0.8, f);
      end
      run(96, 1, 0.8, f);
      run(96, 3, 0.65, f);
      turn = g + 1;
    end
  end

  initial begin
    for (int i = 0; i < 96; i++) ids[i] = $urandom;
    #1 turn = 0;
    wait (turn == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
