// lfsr32: pseudo-random pattern generator of a teacher-student pair.
// A WIDTH-bit Galois LFSR that advances one step per clock while en is high;
// its state q is the test pattern fed to both cores of the pair, so both see
// the same word in the same cycle. Reset loads SEED (must be nonzero).
// The 32-bit length follows the chip; the polynomial
// x^32 + x^22 + x^2 + x + 1 (maximal length) and the seed are this design's
// choice. Taps are given as a mask in TAPS for other widths.
module lfsr32 #(
  parameter int unsigned      WIDTH = 32,
  parameter logic [WIDTH-1:0] TAPS  = 32'h8020_0003,
  parameter logic [WIDTH-1:0] SEED  = 32'h0000_0001
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] state;

  // Galois step: shift right, and if the bit shifted out is 1 XOR the tap mask.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      state <= SEED;
    else if (en)
      state <= (state >> 1) ^ (state[0] ? TAPS : '0);
  end

  assign q = state;

  initial assert (SEED != '0) else $error("lfsr32: SEED must be nonzero");
endmodule
