// lfsr_rng: free-running 32-bit xorshift pseudo-random generator.
//
// Each clock the state x is replaced by x ^= x<<13; x ^= x>>17; x ^= x<<5,
// a full-period (2^32-1) shift-register sequence. The HAFQ zombie list needs a
// randomly selected row and a swap decision taken with probability q; the
// estimator uses random low bits to round its averages without bias. The
// scheme only asks for randomness; the generator is this design's choice.
// rnd is the registered state, valid from the first cycle after reset; SEED must
// be non-zero.
module lfsr_rng #(
  parameter logic [31:0] SEED = 32'h2545_F491
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [31:0] rnd
);
  function automatic logic [31:0] step(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rnd <= SEED;
    else        rnd <= step(rnd);
  end

  initial assert (SEED != 0) else $error("lfsr_rng: SEED must be non-zero");
endmodule
