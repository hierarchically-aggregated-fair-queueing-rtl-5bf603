// tb_lfsr_rng: compares the generator with a reference xorshift32 sequence and
// checks that the swap test used by the zombie list (rnd[15:0] < 655) succeeds
// with a frequency close to q = 0.01 and that row choices are balanced.
module tb_lfsr_rng;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [31:0] rnd;
  lfsr_rng #(.SEED(32'h1234_5678)) dut (.clk, .rst_n, .rnd);
  always #5 clk = ~clk;

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

  initial begin
    logic [31:0] x;
    int swaps = 0;
    int rows[4] = '{0, 0, 0, 0};
    x = 32'h1234_5678;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 40000; i++) begin
      if (i < 2000) check(rnd == x, $sformatf("step %0d got %h exp %h", i, rnd, x));
      if (rnd[15:0] < 16'd655) swaps++;
      rows[rnd[17:16]]++;
      x ^= x << 13; x ^= x >> 17; x ^= x << 5;
      @(negedge clk);
    end
    // 40000 draws, q = 655/65536: expect ~400
    check(swaps > 320 && swaps < 480, $sformatf("swap count %0d", swaps));
    foreach (rows[r]) check(rows[r] > 9500 && rows[r] < 10500, $sformatf("row %0d count %0d", r, rows[r]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
