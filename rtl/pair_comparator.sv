// pair_comparator: the error check of a teacher-student pair.
// The WIDTH-bit outputs of the two cores are XORed bit by bit and the result
// is ORed into one flag: fail = 1 when the student's output differs from the
// teacher's (the teacher is the expected-vector generator, so no expected
// vectors come from the tester). Combinational.
// The XOR comparison of the 17-bit outputs follows the chip; the OR reduction
// and the 1 = fail polarity are this design's choice.
module pair_comparator #(
  parameter int unsigned WIDTH = 17
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             fail
);
  logic [WIDTH-1:0] diff;

  always_comb begin
    diff = a ^ b;
    fail = |diff;
  end
endmodule
