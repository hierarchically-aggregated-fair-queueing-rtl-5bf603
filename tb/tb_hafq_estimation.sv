// tb_hafq_estimation: the flow-count estimation experiment run on the complete
// traffic manager at its default size. All flows hash into one queue; the number
// of active flows doubles every epoch from 1 to 64. Run A uses flows of equal
// rate; run B makes half of the flows three times faster than the others, the
// case where an estimate that ignores rate differences undercounts. Packets
// arrive one per cycle and the output is always ready, so arrivals, not the
// link, set the rates. At the end of every epoch with more active flows than
// zombie-list entries the estimate N of the queue must lie within a factor of
// two of the number of active flows. Estimates are printed for every epoch.
module tb_hafq_estimation;
  import hafq_pkg::*;
  localparam int NQ = 64, QX = 17, EPOCH = 25000;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0;
  pkt_desc_t   in_desc = '0;
  logic        out_valid, out_ready = 1;
  pkt_desc_t   out_desc;
  logic        ing_valid, ing_avg_upd, drr_rotate;
  logic [5:0]  ing_queue, mon_queue = 6'(QX);
  zl_event_e   ing_event;
  drop_e       ing_drop;
  logic [12:0] occupancy;
  est_word_t   mon_est;
  sched_word_t mon_sched;

  hafq_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2 * 8 * EPOCH + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_queue(input logic [31:0] v);
    logic [15:0] c = 16'hFFFF;
    for (int b = 3; b >= 0; b--) begin
      c ^= {v[b*8 +: 8], 8'h00};
      repeat (8) c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
    end
    return int'(c) % NQ;
  endfunction

  logic [31:0] ids [64];
  int seq = 0;

  task automatic run(input string name, input int fast_weight);
    int nf, w, total_w, pick;
    rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    nf = 1;
    for (int ep = 0; ep < 7; ep++) begin
      total_w = 0;
      for (int i = 0; i < nf; i++) total_w += (i % 2 == 1) ? fast_weight : 1;
      for (int c = 0; c < EPOCH; c++) begin
        @(negedge clk);
        pick = $urandom_range(0, total_w - 1);
        w = 0;
        for (int i = 0; i < nf; i++) begin
          w += (i % 2 == 1) ? fast_weight : 1;
          if (pick < w) begin
            in_desc = '{flow_id: ids[i], len: 16'd512, handle: 16'(seq)};
            break;
          end
        end
        in_valid = 1;
        seq++;
      end
      @(negedge clk);
      in_valid = 0;
      @(negedge clk);
      $display("%s: %0d active flows, estimate %0d (average %0d/4, miss %0d/256)", name, nf,
               mon_sched.nflows, mon_est.avg_rate, mon_est.miss_prob);
      if (nf > 4)
        check(2 * int'(mon_sched.nflows) >= nf && int'(mon_sched.nflows) <= 2 * nf,
              $sformatf("%s: estimate %0d for %0d flows", name, mon_sched.nflows, nf));
      nf *= 2;
    end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) begin
      logic [31:0] v;
      do v = $urandom; while (ref_queue(v) != QX);
      ids[i] = v;
    end
    run("equal rates", 1);
    run("half the flows 3x faster", 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
