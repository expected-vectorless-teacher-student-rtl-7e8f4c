// tb_tss_core: self-checking test of one test core.
// Drives a random 32-bit pattern every clock and compares dout with
// upper half + lower half of the pattern applied two clocks earlier (the
// two register stages). supply_fault is raised for stretches of cycles; a
// pattern captured by the output register while it is high must come out with
// bit FAULT_BIT cleared. Also checks the reset value and counts the faulty
// results that differed from the correct sum.
module tb_tss_core;
  localparam int unsigned WIDTH     = 16;
  localparam int unsigned FAULT_BIT = 16;

  logic                 clk = 0, rst_n = 0, fault = 0;
  logic [2*WIDTH-1:0]   din = '0;
  logic [WIDTH:0]       dout;
  logic [2*WIDTH-1:0]   hist [3];
  logic                 fhist [2];
  logic [WIDTH:0]       expected;
  int checks = 0, failures = 0, corrupted = 0;

  tss_core #(.WIDTH(WIDTH), .FAULT_BIT(FAULT_BIT)) dut (
    .clk(clk), .rst_n(rst_n), .din(din), .supply_fault(fault), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 checks++;
    if (dout !== '0) begin failures++; $display("FAIL reset value %h", dout); end
    rst_n = 1;
    hist  = '{default: '0};
    fhist = '{default: 1'b0};
    for (int i = 0; i < 3000; i++) begin
      din   = $urandom;
      fault = ((i / 50) % 3 == 1);
      @(posedge clk);
      // sampled values: hist[0] = pattern captured now, hist[1] = one clock before
      hist[2]  = hist[1];
      hist[1]  = hist[0];
      hist[0]  = din;
      fhist[1] = fhist[0];
      fhist[0] = fault;
      #1;
      if (i >= 2) begin
        expected = (WIDTH+1)'(hist[1][2*WIDTH-1:WIDTH]) + (WIDTH+1)'(hist[1][WIDTH-1:0]);
        if (fhist[0]) begin
          if (expected[FAULT_BIT]) corrupted++;
          expected[FAULT_BIT] = 1'b0;
        end
        checks++;
        if (dout !== expected) begin
          failures++;
          $display("FAIL cycle %0d: dout=%h expected %h", i, dout, expected);
        end
      end
    end
    checks++;
    if (corrupted == 0) begin failures++; $display("FAIL fault model never changed a result"); end
    $display("corrupted results: %0d", corrupted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
