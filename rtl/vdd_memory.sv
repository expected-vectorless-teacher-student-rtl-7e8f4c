// vdd_memory: the V_DD memory of one core and the selector in front of its
// power switch.
// The memory is one sticky bit: clr empties it at the start of the core's
// test, and every cycle in which wr_en and fail_in are both high sets it, so
// after the test it is 1 if the student ever disagreed with the teacher.
// The selector drives the power switch: while test_mode is high the rail is
// the one the test asks for (test_sel_h, the Test0/Test1 signal); afterwards
// it is the stored result, a failed core staying on V_DDH and a passing one
// moving to V_DDL. 1 means V_DDH throughout. clr wins over a write in the same
// cycle. Reset clears the bit, so an untested core sits on V_DDL once
// test_mode is low; the top keeps test_mode high until a test is run.
// Storing the pass/fail result per core and selecting between the Test input
// and the memory follow the chip; the sticky accumulation and the use of
// test_mode as the select are this design's choice.
module vdd_memory (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic wr_en,
  input  logic fail_in,
  input  logic test_mode,
  input  logic test_sel_h,
  output logic failed,
  output logic sel_vddh
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                failed <= 1'b0;
    else if (clr)              failed <= 1'b0;
    else if (wr_en && fail_in) failed <= 1'b1;
  end

  assign sel_vddh = test_mode ? test_sel_h : failed;
endmodule
