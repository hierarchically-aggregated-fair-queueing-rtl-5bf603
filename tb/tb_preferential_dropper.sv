// tb_preferential_dropper: random and corner-case comparison of the admission
// decision with a real-valued statement of the rule: drop a Hit packet whose
// counter exceeds the list's average counter while the queue is longer than half
// its capacity; otherwise tail-drop at the queue limit or when the pool is full.
module tb_preferential_dropper;
  import hafq_pkg::*;
  localparam int M = 4, CAP = 100;
  int checks = 0, failures = 0;

  zl_event_e          ev;
  logic [CNT_W-1:0]   cnt_new;
  logic [TOTAL_W-1:0] total_new;
  logic [QLEN_W-1:0]  qlen;
  logic               pool_full;
  logic               drop;
  drop_e              reason;

  preferential_dropper #(.M(M), .QUEUE_CAP(CAP)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input zl_event_e e, input int c, input int t, input int ql, input bit pf);
    real avg;
    drop_e exp;
    ev = e; cnt_new = CNT_W'(c); total_new = TOTAL_W'(t); qlen = QLEN_W'(ql); pool_full = pf;
    #1;
    avg = real'(t) / real'(M);
    if (e == ZL_HIT && real'(c) > avg && real'(ql) > real'(CAP) / 2.0) exp = DROP_PREF;
    else if (ql >= CAP) exp = DROP_QFULL;
    else if (pf)        exp = DROP_POOL;
    else                exp = DROP_NONE;
    check(reason == exp && drop == (exp != DROP_NONE),
          $sformatf("ev=%s c=%0d t=%0d ql=%0d pf=%0d got %s exp %s", e.name(), c, t, ql, pf, reason.name(), exp.name()));
  endtask

  initial begin
    int npref = 0;
    // boundaries: counter equal to the average is kept, one above is dropped
    one(ZL_HIT, 5, 20, 51, 0);
    one(ZL_HIT, 6, 20, 51, 0);
    one(ZL_HIT, 6, 20, 50, 0);
    one(ZL_SWAP, 1, 2, 90, 0);
    one(ZL_HIT, 1, 3, 100, 0);
    one(ZL_NOSWAP, 0, 40, 10, 1);
    for (int i = 0; i < 20000; i++) begin
      automatic int c = $urandom_range(1, 1023);
      automatic int sel = $urandom_range(0, 2);
      one(sel == 0 ? ZL_HIT : sel == 1 ? ZL_SWAP : ZL_NOSWAP, c,
          $urandom_range(c, 4095 < 4 * c + 10 ? 4095 : 4 * c + 10), $urandom_range(0, CAP), $urandom_range(0, 1));
      if (reason == DROP_PREF) npref++;
    end
    check(npref > 500, $sformatf("preferential drops seen %0d", npref));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
