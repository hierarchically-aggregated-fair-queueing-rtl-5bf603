// tb_crc16_hash: checks the CRC-16/CCITT hash against the standard check value
// (CRC of ASCII "123456789" = 0x29B1) and against a byte-wise reference CRC,
// modulo-NQ queue index and XOR-folded flow key for random 32-bit flow IDs.
module tb_crc16_hash;
  int checks = 0, failures = 0;

  // standard check vector, 72 bits
  logic [71:0] ascii;
  logic [15:0] crc72;
  logic [5:0]  q72;
  logic [11:0] k72;
  crc16_hash #(.IN_W(72), .NQ(64), .KEY_W(12)) u72 (.data(ascii), .crc(crc72), .qidx(q72), .key(k72));

  // flow-ID instance with a queue count that is not a power of two
  logic [31:0] id;
  logic [15:0] crc;
  logic [5:0]  q;
  logic [11:0] k;
  crc16_hash #(.IN_W(32), .NQ(48), .KEY_W(12)) u32 (.data(id), .crc(crc), .qidx(q), .key(k));

  function automatic logic [15:0] ref_crc(input logic [31:0] v);
    logic [15:0] c = 16'hFFFF;
    for (int b = 3; b >= 0; b--) begin
      c ^= {v[b*8 +: 8], 8'h00};
      repeat (8) c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
    end
    return c;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] r;
    ascii = "123456789";
    #1;
    check(crc72 == 16'h29B1, $sformatf("check value %h", crc72));
    for (int i = 0; i < 2000; i++) begin
      id = (i < 4) ? 32'(i) : $urandom();
      #1;
      r = ref_crc(id);
      check(crc == r, $sformatf("crc id=%h got %h exp %h", id, crc, r));
      check(32'(q) == 32'(r) % 48, $sformatf("queue id=%h", id));
      check(k == (id[11:0] ^ id[23:12] ^ {4'h0, id[31:24]}), $sformatf("key id=%h", id));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
