// tb_lfsr32: self-checking test of the 32-bit pattern generator.
// Checks that reset loads the seed, that the state holds while en is low, and
// that each step matches a bit-by-bit model of the Galois register for
// x^32 + x^22 + x^2 + x + 1 (bit i takes bit i+1, XORed with the bit shifted
// out of bit 0 where the polynomial has a term x^(i+1); bit 31 takes the bit
// shifted out). Also checks that the 20000 states visited are never zero and
// never return to the seed.
module tb_lfsr32;
  localparam logic [31:0] SEED = 32'h1234_5678;

  logic        clk = 0, rst_n = 0, en = 0;
  logic [31:0] q, model;
  int checks = 0, failures = 0;

  lfsr32 #(.SEED(SEED)) dut (.clk(clk), .rst_n(rst_n), .en(en), .q(q));

  always #5 clk = ~clk;

  function automatic logic [31:0] step(input logic [31:0] s);
    logic [31:0] n;
    logic        out;
    out = s[0];
    for (int i = 0; i < 31; i++) n[i] = s[i+1];
    n[31] = out;
    // polynomial terms x^1, x^2, x^22 feed bits 0, 1, 21
    n[0]  = n[0]  ^ out;
    n[1]  = n[1]  ^ out;
    n[21] = n[21] ^ out;
    return n;
  endfunction

  task automatic expect_q(input logic [31:0] e, input string what);
    checks++;
    if (q !== e) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 expect_q(SEED, "reset value");
    rst_n = 1;
    repeat (3) @(posedge clk);
    #1 expect_q(SEED, "hold with en low");
    model = SEED;
    en = 1;
    for (int i = 0; i < 20000; i++) begin
      @(posedge clk);
      #1;
      model = step(model);
      expect_q(model, "step");
      checks++;
      if (q == '0 || q == SEED) begin
        failures++;
        $display("FAIL state %h after %0d steps", q, i + 1);
      end
      if (i == 100) begin
        en = 0;
        repeat (2) @(posedge clk);
        #1 expect_q(model, "hold mid-run");
        en = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
