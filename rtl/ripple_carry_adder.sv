// ripple_carry_adder: the 16-bit adder inside each test core.
// WIDTH full adders are chained, the carry rippling from bit 0 upwards; the
// carry into bit 0 is 0 and the carry out of the top bit is the extra result
// bit, so a WIDTH-bit pair of operands gives a WIDTH+1-bit sum (16 in, 17 out,
// as in the test core). Purely combinational, no clock.
// The ripple structure and the widths follow the chip; writing the full adder
// as sum/majority equations is this design's choice.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH:0]   sum
);
  logic [WIDTH:0] carry;

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(carry[i]),
      .s (sum[i]),
      .co(carry[i+1])
    );
  end

  assign sum[WIDTH] = carry[WIDTH];
endmodule
