// tss_core: one core of the homogeneous multi-core array, the unit that the
// Teacher-Student Swap test checks.
// A 2*WIDTH-bit input register captures the pattern din; its upper and lower
// halves are added by the WIDTH-bit ripple carry adder; a WIDTH+1-bit output
// register captures the sum. dout therefore shows a + b of the pattern
// presented two clocks earlier (two register stages, no enable).
// The register / adder / register structure and the 32-in, 17-out widths
// follow the chip. The operand split (a = upper half, b = lower half) and the
// reset to zero are this design's choice.
// supply_fault has no wire in silicon: it stands for a core run below the
// supply at which its gates still switch correctly. While it is high, bit
// FAULT_BIT of the sum captured by the output register is lost (forced to 0),
// an error that shows only for patterns that set that bit, so the random
// patterns have to find it. Errors caused by device variation fall in
// different places in different cores; the pair gives its two cores different
// FAULT_BIT values so that two failing cores do not fail identically.
// Tie supply_fault to 0 for a working core.
module tss_core #(
  parameter int unsigned WIDTH     = 16,
  parameter int unsigned FAULT_BIT = WIDTH
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [2*WIDTH-1:0] din,
  input  logic               supply_fault,
  output logic [WIDTH:0]     dout
);
  logic [2*WIDTH-1:0] din_q;
  logic [WIDTH:0]     sum;
  logic [WIDTH:0]     sum_seen;

  initial assert (FAULT_BIT <= WIDTH) else $error("tss_core: FAULT_BIT out of range");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) din_q <= '0;
    else        din_q <= din;
  end

  ripple_carry_adder #(.WIDTH(WIDTH)) u_adder (
    .a  (din_q[2*WIDTH-1:WIDTH]),
    .b  (din_q[WIDTH-1:0]),
    .sum(sum)
  );

  always_comb begin
    sum_seen = sum;
    if (supply_fault) sum_seen[FAULT_BIT] = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else        dout <= sum_seen;
  end
endmodule
