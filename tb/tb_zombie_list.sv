// tb_zombie_list: drives the zombie lists of 4 queues (M = 4) with random keys and
// a controlled random word, and compares event, row, counters, evicted counter,
// total and the stored table with a reference model of Hit / Swap / No-swap.
// Also checks that a counter saturates at 1023 and that a key in one queue does
// not hit in another.
module tb_zombie_list;
  import hafq_pkg::*;
  localparam int NQ = 4, M = 4, QP = 655;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              req_valid = 0;
  logic [1:0]        req_queue = 0;
  logic [KEY_W-1:0]  req_key = 0;
  logic [31:0]       rnd = 0;
  zl_event_e         ev;
  logic [1:0]        row;
  logic [CNT_W-1:0]  cnt_new, evicted_cnt;
  logic [TOTAL_W-1:0] total_new;
  logic [1:0]        dbg_queue = 0, dbg_row = 0;
  zombie_t           dbg_entry;

  zombie_list #(.NQ(NQ), .M(M), .Q_PROB(QP)) dut (.*);

  int mkey [NQ][M];
  zl_event_e last_ev;
  int mcnt [NQ][M];

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

  // one request; the model predicts, the DUT is compared, then the clock edge commits
  task automatic request(input int qu, input int key, input bit swap, input int r);
    int hit_j, e_ev, e_row, e_cnt, e_ev_cnt, tot;
    req_valid = 1; req_queue = 2'(qu); req_key = KEY_W'(key);
    rnd = {16'(r), swap ? 16'($urandom_range(0, QP - 1)) : 16'($urandom_range(QP, 65535))};
    hit_j = -1;
    for (int j = 0; j < M; j++) if (hit_j < 0 && mcnt[qu][j] != 0 && mkey[qu][j] == key) hit_j = j;
    e_ev_cnt = 0;
    if (hit_j >= 0) begin
      e_ev = ZL_HIT; e_row = hit_j;
      if (mcnt[qu][hit_j] < 1023) mcnt[qu][hit_j]++;
      e_cnt = mcnt[qu][hit_j];
    end else if (swap) begin
      e_ev = ZL_SWAP; e_row = (r & 16'hFFFF) % M; e_ev_cnt = mcnt[qu][e_row];
      mkey[qu][e_row] = key; mcnt[qu][e_row] = 1; e_cnt = 1;
    end else begin
      e_ev = ZL_NOSWAP; e_row = (r & 16'hFFFF) % M; e_cnt = 0;
    end
    tot = 0;
    for (int j = 0; j < M; j++) tot += mcnt[qu][j];
    #1;
    check(ev == zl_event_e'(e_ev), $sformatf("event q%0d key %0d: got %s exp %0d", qu, key, ev.name(), e_ev));
    if (e_ev != ZL_NOSWAP) check(int'(row) == e_row, "row");
    check(int'(cnt_new) == e_cnt, $sformatf("cnt_new got %0d exp %0d", cnt_new, e_cnt));
    check(int'(evicted_cnt) == e_ev_cnt, $sformatf("evicted got %0d exp %0d", evicted_cnt, e_ev_cnt));
    check(int'(total_new) == (tot > 4095 ? 4095 : tot), $sformatf("total got %0d exp %0d", total_new, tot));
    last_ev = ev;
    @(posedge clk); #1;
    req_valid = 0;
  endtask

  initial begin
    int nhit = 0, nswap = 0, nnos = 0;
    foreach (mkey[a, b]) begin mkey[a][b] = 0; mcnt[a][b] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // random traffic over a small key space so that hits, swaps and no-swaps all occur
    for (int i = 0; i < 6000; i++) begin
      automatic int qu, key;
      automatic bit sw;
      qu  = $urandom_range(0, NQ - 1);
      key = $urandom_range(1, 10);
      sw  = ($urandom_range(0, 2) == 0);
      request(qu, key, sw, $urandom);
      if (last_ev == ZL_HIT) nhit++; else if (last_ev == ZL_SWAP) nswap++; else nnos++;
    end
    check(nhit > 100 && nswap > 100 && nnos > 100, $sformatf("event mix %0d/%0d/%0d", nhit, nswap, nnos));
    // stored table matches the model
    for (int qu = 0; qu < NQ; qu++)
      for (int j = 0; j < M; j++) begin
        dbg_queue = 2'(qu); dbg_row = 2'(j); #1;
        check(int'(dbg_entry.count) == mcnt[qu][j] &&
              (mcnt[qu][j] == 0 || int'(dbg_entry.key) == mkey[qu][j]), $sformatf("table q%0d r%0d", qu, j));
      end
    // saturation: key 3000 into queue 2, row 1, then 1100 hits
    request(2, 3000, 1, 1);
    for (int i = 0; i < 1100; i++) request(2, 3000, 0, 0);
    dbg_queue = 2'd2; dbg_row = 2'd1; #1;
    check(dbg_entry.count == 10'd1023, $sformatf("saturated counter %0d", cnt_new));
    // same key in another queue is a miss
    request(3, 3000, 0, 0);
    check(last_ev == ZL_NOSWAP, "key isolation between queues");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
