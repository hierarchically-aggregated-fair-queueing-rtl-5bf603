// tb_hafq_fairness: the fairness-versus-number-of-flows experiment run on the
// complete traffic manager at its default size (64 queues). 16, 64, 256 and 1024
// flows with random flow IDs are hashed over the queues; the input offers one
// 512-byte packet per cycle and the output takes one packet every other cycle on
// average, so the link is overloaded twice. Run A uses flows of equal rate; in
// run B half of the flows send three times faster (ill-behaved flows). After a
// warm-up the per-flow delivered bytes are measured and the fairness index
// f = (sum x)^2 / (n sum x^2) is computed. Checked: f stays high for every size,
// every admitted packet leaves, and the estimator and the preferential drop
// are active.
module tb_hafq_fairness;
  import hafq_pkg::*;
  localparam int NQ = 64, WARM = 100000, MEAS = 100000;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0;
  pkt_desc_t   in_desc = '0;
  logic        out_valid, out_ready = 0;
  pkt_desc_t   out_desc;
  logic        ing_valid, ing_avg_upd, drr_rotate;
  logic [5:0]  ing_queue, mon_queue = 0;
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
    repeat (8 * (WARM + MEAS + 20000) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] ids [1024];
  longint      got [logic [31:0]];
  bit          measure;
  int          n_pref, n_avg, n_acc, n_out;
  bit          last_ov, last_or;

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid && out_ready) begin
        n_out++;
        if (measure) begin
          if (got.exists(out_desc.flow_id)) got[out_desc.flow_id] += out_desc.len;
          else got[out_desc.flow_id] = out_desc.len;
        end
      end
      if (ing_valid) begin
        if (ing_drop == DROP_PREF) n_pref++;
        if (ing_drop == DROP_NONE) n_acc++;
        if (ing_avg_upd) n_avg++;
      end
    end
  end

  task automatic run(input int nf, input int fast_weight, input real fmin);
    int total_w, pick, w;
    real s, s2, f;
    got.delete();
    n_pref = 0; n_avg = 0; n_acc = 0; n_out = 0;
    measure = 0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    total_w = 0;
    for (int i = 0; i < nf; i++) total_w += (i % 2 == 1) ? fast_weight : 1;
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
    end
    @(negedge clk);
    in_valid = 0;
    measure  = 0;
    out_ready = 1;
    for (int c = 0; c < 20000 && (occupancy != 0 || out_valid); c++) @(negedge clk);
    @(negedge clk);
    s = 0; s2 = 0;
    for (int i = 0; i < nf; i++) begin
      real x = got.exists(ids[i]) ? real'(got[ids[i]]) : 0.0;
      s += x; s2 += x * x;
    end
    f = s * s / (real'(nf) * s2);
    $display("%0d flows, fast weight %0d: fairness index %f (preferential drops %0d, average updates %0d)",
             nf, fast_weight, f, n_pref, n_avg);
    check(f >= fmin, $sformatf("%0d flows weight %0d: fairness %f below %f", nf, fast_weight, f, fmin));
    check(n_out == n_acc && occupancy == 0, $sformatf("delivered %0d of %0d admitted", n_out, n_acc));
    if (nf > 64) check(n_avg > 0 && n_pref > 0, "estimator and preferential drop active");
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) ids[i] = $urandom;
    run(16, 1, 0.85);
    run(64, 1, 0.75);
    run(256, 1, 0.8);
    run(1024, 1, 0.8);
    run(16, 3, 0.65);
    run(64, 3, 0.65);
    run(256, 3, 0.65);
    run(1024, 3, 0.65);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
