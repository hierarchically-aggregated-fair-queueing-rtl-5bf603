// tb_flow_estimator: checks the flow-count estimator of 4 queues (M = 4, q = 0.01).
// Part 1 compares every stored word and every N with an integer model of the
// update rules for random events, evicted counters and random rounding bits.
// Part 2 checks the estimate against the closed form of the HAFQ estimator: with a
// constant evicted counter E and hit probability p, the average settles at
// R = (1-p)(q/M)(E-1) and N = 1/R.
module tb_flow_estimator;
  import hafq_pkg::*;
  localparam int NQ = 4, M = 4, QP = 655, AS = 4, MS = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               upd_valid = 0;
  logic [1:0]         upd_queue = 0;
  zl_event_e          upd_ev = ZL_NOSWAP;
  logic [CNT_W-1:0]   evicted_cnt = 0;
  logic [TOTAL_W-1:0] total = 0;
  logic [31:0]        rnd = 0;
  logic               avg_upd;
  logic [NFLOW_W-1:0] nflows;
  logic [1:0]         dbg_queue = 0;
  est_word_t          dbg_word;

  flow_estimator #(.NQ(NQ), .M(M), .Q_PROB(QP), .ALPHA_SHIFT(AS), .MISS_SHIFT(MS)) dut (.*);

  longint m_miss [NQ];
  longint m_avg  [NQ];
  longint m_tot  [NQ];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint n_of(input longint a);
    longint d, n;
    if (a == 0) return 4095;
    d = longint'(QP) * a;
    n = ((longint'(M) << 18) + d / 2) / d;
    if (n > 4095) n = 4095;
    if (n < 1) n = 1;
    return n;
  endfunction

  task automatic step(input int qu, input zl_event_e e, input int ecnt, input int tot, input bit model);
    longint mm, c, acc, md;
    bit upd;
    upd_valid = 1; upd_queue = 2'(qu); upd_ev = e; evicted_cnt = CNT_W'(ecnt);
    total = TOTAL_W'(tot); rnd = $urandom;
    if (model) begin
      mm = (m_miss[qu] * ((1 << MS) - 1) + ((e != ZL_HIT) ? 255 : 0) + longint'(rnd[16 +: MS])) >> MS;
      m_miss[qu] = mm;
      m_tot[qu]  = tot;
      upd = (e == ZL_SWAP) && ecnt >= 2;
      if (upd) begin
        md  = (mm == 0) ? 1 : mm;
        c   = (longint'(ecnt) << (24 - AS)) / (md * (ecnt - 1));
        if (c > 65536) c = 65536;
        acc = (m_avg[qu] << 16) - m_avg[qu] * c + (longint'(ecnt) << (18 - AS)) + longint'(rnd[15:0]);
        m_avg[qu] = (acc >> 16) > 4095 ? 4095 : (acc >> 16);
      end
      #1;
      check(avg_upd == upd, "avg_upd");
      check(longint'(nflows) == n_of(m_avg[qu]), $sformatf("N q%0d got %0d exp %0d", qu, nflows, n_of(m_avg[qu])));
    end
    @(posedge clk); #1;
    upd_valid = 0;
    if (model) begin
      dbg_queue = 2'(qu); #1;
      check(longint'(dbg_word.miss_prob) == m_miss[qu], $sformatf("miss q%0d got %0d exp %0d", qu, dbg_word.miss_prob, m_miss[qu]));
      check(longint'(dbg_word.avg_rate) == m_avg[qu], $sformatf("avg q%0d got %0d exp %0d", qu, dbg_word.avg_rate, m_avg[qu]));
      check(longint'(dbg_word.total) == m_tot[qu], "total");
    end
  endtask

  initial begin
    real r_exp, n_exp;
    for (int k = 0; k < NQ; k++) begin
      m_miss[k] = 255; m_tot[k] = 0;
      m_avg[k]  = ((longint'(M) << 18) / QP) > 4095 ? 4095 : ((longint'(M) << 18) / QP);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // reset state: N = 1
    for (int k = 0; k < NQ; k++) begin
      dbg_queue = 2'(k); #1;
      check(n_of(longint'(dbg_word.avg_rate)) == 1 && dbg_word.miss_prob == 8'd255, "reset word");
    end
    // Part 1: random events
    for (int i = 0; i < 5000; i++) begin
      automatic int sel = $urandom_range(0, 9);
      automatic zl_event_e e = (sel < 5) ? ZL_HIT : (sel < 8) ? ZL_SWAP : ZL_NOSWAP;
      step($urandom_range(0, NQ - 1), e, (sel == 8) ? 1 : $urandom_range(0, 60), $urandom_range(0, 4095), 1);
    end
    // Part 2a: every packet misses and swaps out E = 5 -> p ~ 0: N = (M/q) / ((255/256) * 4)
    for (int i = 0; i < 1500; i++) step(1, ZL_SWAP, 5, 20, 0);
    n_exp = (real'(M) * 65536.0 / QP) / ((255.0 / 256.0) * 4.0);
    check(real'(nflows) > 0.9 * n_exp && real'(nflows) < 1.1 * n_exp,
          $sformatf("steady N %0d expected about %0f", nflows, n_exp));
    // Part 2b: half the packets hit; each miss swaps out E = 9 -> (1-p) = 1/2, N = (M/q)/(0.5*8)
    for (int i = 0; i < 3000; i++) step(2, (i % 2) ? ZL_HIT : ZL_SWAP, 9, 20, 0);
    step(2, ZL_HIT, 0, 20, 0);
    dbg_queue = 2'd2; #1;
    r_exp = 0.5 * 8.0;
    n_exp = (real'(M) * 65536.0 / QP) / r_exp;
    check(dbg_word.miss_prob > 8'd100 && dbg_word.miss_prob < 8'd156, $sformatf("miss prob %0d", dbg_word.miss_prob));
    check(real'(nflows) > 0.85 * n_exp && real'(nflows) < 1.15 * n_exp,
          $sformatf("steady N (p=1/2) %0d expected about %0f", nflows, n_exp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
