// tb_pair_comparator: self-checking test of the XOR comparator.
// Equal inputs must give fail = 0; inputs differing in any single bit, or in
// random bits, must give fail = 1.
module tb_pair_comparator;
  localparam int unsigned WIDTH = 17;

  logic [WIDTH-1:0] a, b;
  logic             fail;
  int checks = 0, failures = 0;

  pair_comparator #(.WIDTH(WIDTH)) dut (.a(a), .b(b), .fail(fail));

  task automatic check(input logic [WIDTH-1:0] x, input logic [WIDTH-1:0] y);
    a = x;
    b = y;
    #1;
    checks++;
    if (fail !== (x != y)) begin
      failures++;
      $display("FAIL a=%h b=%h fail=%b", x, y, fail);
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
    logic [WIDTH-1:0] r;
    check('0, '0);
    check('1, '1);
    for (int i = 0; i < WIDTH; i++) begin
      r = WIDTH'($urandom);
      check(r, r);
      check(r, r ^ (WIDTH'(1) << i));
    end
    for (int i = 0; i < 1000; i++) begin
      r = WIDTH'($urandom);
      check(r, (i % 2) ? r : WIDTH'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
