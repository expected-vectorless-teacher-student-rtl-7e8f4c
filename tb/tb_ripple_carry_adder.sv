// tb_ripple_carry_adder: self-checking test of the 16-bit ripple carry adder.
// Applies corner operands (zeros, all ones, alternating bits, a carry that
// ripples through every stage) and 4000 random pairs, and compares the 17-bit
// sum with the integer sum a + b worked out in the testbench.
module tb_ripple_carry_adder;
  localparam int unsigned WIDTH = 16;

  logic [WIDTH-1:0] a, b;
  logic [WIDTH:0]   sum;
  int checks = 0, failures = 0;

  ripple_carry_adder #(.WIDTH(WIDTH)) dut (.a(a), .b(b), .sum(sum));

  task automatic check(input logic [WIDTH-1:0] x, input logic [WIDTH-1:0] y);
    int unsigned expected;
    a = x;
    b = y;
    #1;
    expected = int'(x) + int'(y);
    checks++;
    if (sum !== (WIDTH+1)'(expected)) begin
      failures++;
      $display("FAIL %h + %h = %h, expected %h", x, y, sum, expected);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0);
    check('1, '1);
    check('1, 16'h0001);            // carry ripples through all 16 stages
    check(16'hAAAA, 16'h5555);
    check(16'h8000, 16'h8000);      // carry out only
    for (int i = 0; i < WIDTH; i++) check(WIDTH'(1) << i, WIDTH'(1) << i);
    for (int i = 0; i < 4000; i++) check(WIDTH'($urandom), WIDTH'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
