// tb_hafq_top: end-to-end test of the HAFQ traffic manager at its default size
// (64 queues, 4-entry zombie lists, q = 0.01, 4096-descriptor pool).
//
// Traffic, one descriptor per cycle, 512-byte packets:
//   phase 1  one flow hashed to queue QA and 32 flows hashed to queue QB share the
//            input half and half; the output accepts a packet one cycle in four.
//            The estimator must find about 32 flows in QB and 1 in QA, DRR must
//            give QB a correspondingly larger share, and per-flow throughput
//            must be fair (fairness index);
//   phase 2  output blocked, new flows only into QB: the queue limit is reached;
//   phase 3  output blocked, new flows into every queue: the pool fills;
//   phase 4  input stops, the output drains everything.
// Checked throughout against a model kept here: queue index of every packet
// (reference CRC-16), every drop reason against the modelled queue lengths and
// pool occupancy, the queue length reported on the monitor port, every output
// descriptor (intact, delivered once, in order within its flow), and at the
// end that every admitted packet left. Each mechanism (Hit, Swap, No-swap,
// average update, preferential drop, queue-limit drop, pool drop, DRR rotation,
// output stall, quantum change) is counted and must occur.
module tb_hafq_top;
  import hafq_pkg::*;
  localparam int NQ = 64, BUF = 4096, CAP = 255, QA = 5, QB = 9, NB = 32;
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
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
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

  function automatic logic [31:0] id_for(input int q);
    logic [31:0] v;
    do v = $urandom; while (ref_queue(v) != q);
    return v;
  endfunction

  // model
  int        qlen_m [NQ];
  int        held_m = 0;
  pkt_desc_t sent_tab [int];        // admitted, not yet delivered, by handle
  int        last_seq [logic [31:0]];
  int        seq = 0;
  longint    bytes_q [NQ];
  longint    bytes_f [logic [31:0]];
  bit        measure = 0;

  // pipeline of presented packets: stage 2 reports the one presented a cycle earlier
  bit        p_valid = 0;
  pkt_desc_t p_desc;
  bit        last_ov = 0, last_or = 0;

  // mechanism counters
  int n_hit = 0, n_swap = 0, n_noswap = 0, n_avg = 0, n_pref = 0, n_qfull = 0, n_pool = 0;
  int n_rot = 0, n_stall = 0, n_out = 0, n_in = 0, n_acc = 0;

  task automatic present(input bit v, input logic [31:0] fid);
    in_valid = v;
    in_desc  = '{flow_id: fid, len: 16'd512, handle: 16'(seq)};
    if (v) begin
      seq++;
      n_in++;
    end
  endtask

  // runs at every negedge after the inputs for the coming edge are set
  task automatic observe();
    int q;
    // 1. a new descriptor loaded into the output register at the last edge
    if (out_valid && (!last_ov || last_or)) begin
      n_out++;
      q = ref_queue(out_desc.flow_id);
      check(sent_tab.exists(int'(out_desc.handle)), $sformatf("unknown output handle %0d", out_desc.handle));
      if (sent_tab.exists(int'(out_desc.handle))) begin
        check(sent_tab[int'(out_desc.handle)] == out_desc, "output descriptor corrupted");
        sent_tab.delete(int'(out_desc.handle));
      end
      if (last_seq.exists(out_desc.flow_id))
        check(int'(out_desc.handle) > last_seq[out_desc.flow_id], "flow order");
      last_seq[out_desc.flow_id] = int'(out_desc.handle);
      qlen_m[q]--; held_m--;
      if (measure) begin
        bytes_q[q] += out_desc.len;
        if (bytes_f.exists(out_desc.flow_id)) bytes_f[out_desc.flow_id] += out_desc.len;
        else bytes_f[out_desc.flow_id] = out_desc.len;
      end
    end
    if (out_valid && !out_ready) n_stall++;
    last_ov = out_valid; last_or = out_ready;
    if (drr_rotate) n_rot++;
    // 2. monitor port shows the state after the last edge
    check(int'(mon_sched.qlen) == qlen_m[mon_queue], $sformatf("qlen q%0d got %0d exp %0d", mon_queue, mon_sched.qlen, qlen_m[mon_queue]));
    check(int'(occupancy) == held_m, "occupancy");
    // 3. the packet in stage 2 (enqueued at the coming edge)
    check(ing_valid == p_valid, "ingress valid");
    if (p_valid) begin
      q = ref_queue(p_desc.flow_id);
      check(int'(ing_queue) == q, $sformatf("queue of flow %h: got %0d exp %0d", p_desc.flow_id, ing_queue, q));
      case (ing_event)
        ZL_HIT:  n_hit++;
        ZL_SWAP: n_swap++;
        default: n_noswap++;
      endcase
      if (ing_avg_upd) n_avg++;
      case (ing_drop)
        DROP_PREF:  begin n_pref++;  check(qlen_m[q] > CAP / 2 && ing_event == ZL_HIT, "preferential drop rule"); end
        DROP_QFULL: begin n_qfull++; check(qlen_m[q] == CAP, "queue-limit drop"); end
        DROP_POOL:  begin n_pool++;  check(held_m == BUF && qlen_m[q] < CAP, "pool drop"); end
        default: begin
          check(qlen_m[q] < CAP && held_m < BUF, "admitted into a full queue or pool");
          n_acc++;
          qlen_m[q]++; held_m++;
          sent_tab[int'(p_desc.handle)] = p_desc;
        end
      endcase
    end
    p_valid = in_valid; p_desc = in_desc;
  endtask

  task automatic cycle(input bit v, input logic [31:0] fid, input bit ready);
    @(negedge clk);
    present(v, fid);
    out_ready = ready;
    mon_queue = 6'($urandom_range(0, NQ - 1));
    #1 observe();
  endtask

  logic [31:0] fa;
  logic [31:0] fb [NB];
  int nb_quant = 0;

  initial begin
    real sum, sumsq, fi, n_b;
    int k;
    foreach (qlen_m[i]) begin qlen_m[i] = 0; bytes_q[i] = 0; end
    fa = id_for(QA);
    for (int i = 0; i < NB; i++) fb[i] = id_for(QB);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // phase 1
    for (int c = 0; c < 30000; c++) begin
      k = $urandom_range(0, 2 * NB - 1);
      if (c == 15000) measure = 1;
      cycle(1, (k < NB) ? fa : fb[k - NB], ($urandom_range(0, 3) == 0));
      if (c >= 15000 && c % 100 == 0) begin
        mon_queue = 6'(QB); #1;
        if (mon_sched.alloc_bw != BW_W'(8)) nb_quant++;
      end
    end
    measure = 0;
    mon_queue = 6'(QB); #1;
    n_b = real'(mon_sched.nflows);
    $display("estimated flows in QB: %0d (32 active)", mon_sched.nflows);
    check(mon_sched.nflows >= 12'd16 && mon_sched.nflows <= 12'd64, $sformatf("QB flow estimate %0d", mon_sched.nflows));
    check(mon_sched.alloc_bw == BW_W'(32'(mon_sched.nflows) * 8 > 4095 ? 4095 : 32'(mon_sched.nflows) * 8), "QB quantum");
    mon_queue = 6'(QA); #1;
    check(mon_sched.nflows == 12'd1, $sformatf("QA flow estimate %0d", mon_sched.nflows));
    $display("bytes QA %0d QB %0d", bytes_q[QA], bytes_q[QB]);
    check(real'(bytes_q[QB]) > 0.5 * n_b * real'(bytes_q[QA]) && real'(bytes_q[QB]) < 2.0 * n_b * real'(bytes_q[QA]),
          $sformatf("DRR share QB/QA %f vs estimate %f", real'(bytes_q[QB]) / real'(bytes_q[QA]), n_b));
    sum = 0; sumsq = 0;
    foreach (bytes_f[f]) begin sum += real'(bytes_f[f]); sumsq += real'(bytes_f[f]) ** 2; end
    fi = sum * sum / (real'(bytes_f.num()) * sumsq);
    $display("fairness index over %0d flows: %f", bytes_f.num(), fi);
    check(bytes_f.num() == NB + 1 && fi > 0.8, $sformatf("fairness index %f over %0d flows", fi, bytes_f.num()));
    // phase 2
    for (int c = 0; c < 400; c++) cycle(1, id_for(QB), 0);
    // phase 3
    for (int c = 0; c < 6000; c++) cycle(1, $urandom, 0);
    // phase 4
    for (int c = 0; c < 20000 && (held_m != 0 || out_valid); c++) cycle(0, 0, $urandom_range(0, 9) < 7);
    repeat (4) cycle(0, 0, 1);
    check(held_m == 0 && sent_tab.num() == 0 && !out_valid, $sformatf("undelivered %0d", sent_tab.num()));
    check(n_in == n_acc + n_pref + n_qfull + n_pool, "every packet admitted or dropped");
    check(n_out == n_acc, "every admitted packet delivered");
    $display("packets in %0d admitted %0d out %0d", n_in, n_acc, n_out);
    $display("mechanisms: hit %0d swap %0d noswap %0d avg_update %0d pref_drop %0d qlimit_drop %0d pool_drop %0d drr_rotate %0d out_stall %0d quantum_changed %0d",
             n_hit, n_swap, n_noswap, n_avg, n_pref, n_qfull, n_pool, n_rot, n_stall, nb_quant);
    check(n_hit > 0, "hit never happened");
    check(n_swap > 0, "swap never happened");
    check(n_noswap > 0, "no-swap never happened");
    check(n_avg > 0, "average update never happened");
    check(n_pref > 0, "preferential drop never happened");
    check(n_qfull > 0, "queue-limit drop never happened");
    check(n_pool > 0, "pool drop never happened");
    check(n_rot > 0, "DRR rotation never happened");
    check(n_stall > 0, "output stall never happened");
    check(nb_quant > 0, "quantum never changed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
