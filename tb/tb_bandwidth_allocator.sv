// tb_bandwidth_allocator: writes random flow counts into 8 queues and checks that
// each queue's quantum equals N x QPF (limited to 4095) on both read ports, that
// a queue not written keeps its value, and the reset value N = 1.
module tb_bandwidth_allocator;
  import hafq_pkg::*;
  localparam int NQ = 8, QPF = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               wr_valid = 0;
  logic [2:0]         wr_queue = 0, rd_queue = 0, mon_queue = 0;
  logic [NFLOW_W-1:0] wr_nflows = 0;
  logic [BW_W-1:0]    rd_alloc, mon_alloc;
  logic [NFLOW_W-1:0] mon_nflows;

  bandwidth_allocator #(.NQ(NQ), .QPF(QPF)) dut (.*);

  int mn [NQ];

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

  task automatic verify_all();
    for (int k = 0; k < NQ; k++) begin
      automatic int e = mn[k] * QPF > 4095 ? 4095 : mn[k] * QPF;
      rd_queue = 3'(k); mon_queue = 3'(NQ - 1 - k); #1;
      check(int'(rd_alloc) == e, $sformatf("alloc q%0d got %0d exp %0d", k, rd_alloc, e));
      check(int'(mon_nflows) == mn[NQ-1-k], "mon nflows");
    end
  endtask

  initial begin
    foreach (mn[k]) mn[k] = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    verify_all();
    for (int i = 0; i < 3000; i++) begin
      automatic int k = $urandom_range(0, NQ - 1);
      automatic int n = ($urandom_range(0, 3) == 0) ? $urandom_range(400, 4095) : $urandom_range(1, 300);
      wr_valid = ($urandom_range(0, 3) != 0); wr_queue = 3'(k); wr_nflows = NFLOW_W'(n);
      @(posedge clk); #1;
      if (wr_valid) mn[k] = n;
      wr_valid = 0;
      if (i % 10 == 0) verify_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
