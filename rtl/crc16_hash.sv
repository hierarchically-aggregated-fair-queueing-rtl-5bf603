// crc16_hash: assigns a packet to one of NQ queues with a 16-bit CRC of its
// flow identifier, and derives the 12-bit flow key stored in the zombie list.
//
// The CRC is CRC-16/CCITT (polynomial x^16+x^12+x^5+1, 0x1021, initial value
// 0xFFFF, most significant bit first, no final XOR), evaluated over IN_W bits in
// one combinational step. The queue index is the CRC modulo NQ. The flow key is
// the XOR fold of the flow identifier into 12 bits, so that flows sharing a queue
// are told apart by bits independent of the queue choice. Using a 16-bit CRC for
// queue assignment follows the HAFQ scheme; the polynomial, the initial value and
// the key fold are this design's choices. Purely combinational, no clock.
module crc16_hash #(
  parameter int unsigned IN_W  = hafq_pkg::FLOW_ID_W,
  parameter int unsigned NQ    = 64,
  parameter int unsigned KEY_W = hafq_pkg::KEY_W
) (
  input  logic [IN_W-1:0]       data,
  output logic [15:0]           crc,
  output logic [$clog2(NQ)-1:0] qidx,
  output logic [KEY_W-1:0]      key
);
  localparam logic [15:0] POLY = 16'h1021;

  always_comb begin
    logic [15:0] c;
    logic        fb;
    c = 16'hFFFF;
    for (int i = IN_W - 1; i >= 0; i--) begin
      fb = c[15] ^ data[i];
      c  = {c[14:0], 1'b0} ^ (fb ? POLY : 16'h0000);
    end
    crc = c;
  end

  always_comb begin
    logic [31:0] m;
    m     = 32'(crc) % 32'(NQ);
    qidx  = m[$clog2(NQ)-1:0];
  end

  always_comb begin
    key = '0;
    for (int i = 0; i < IN_W; i += KEY_W) begin
      for (int b = 0; b < KEY_W; b++) begin
        if (i + b < IN_W) key[b] = key[b] ^ data[i+b];
      end
    end
  end
endmodule
