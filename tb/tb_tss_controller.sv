// tb_tss_controller: self-checking test of the TSS step sequencer.
// With TEST_CYCLES = 20 it starts the flow twice and, cycle by cycle, checks
// the step order (INIT, CORE0, CORE1, DONE), the length of each step
// (1 clear + PIPE_DEPTH settle + TEST_CYCLES compare cycles), the Test0/Test1
// rail requests of each step, test_mode, busy and done, and the total latency
// from start to done. A start while busy must be ignored.
module tb_tss_controller;
  import tss_pkg::*;

  localparam int unsigned T    = 20;
  localparam int unsigned PIPE = 2;
  localparam int unsigned STEP_LEN = 1 + PIPE + T;

  logic  clk = 0, rst_n = 0, start = 0;
  step_e step;
  logic  clr, cmp_en, test_mode, t0, t1, busy, done;
  int checks = 0, failures = 0;

  tss_controller #(.TEST_CYCLES(T), .PIPE_DEPTH(PIPE)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .step(step), .clr(clr), .cmp_en(cmp_en),
    .test_mode(test_mode), .test0_sel_h(t0), .test1_sel_h(t1), .busy(busy), .done(done));

  always #5 clk = ~clk;

  task automatic expect_bit(input logic got, input logic want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %b want %b (step %s)", what, got, want, step.name());
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
    step_e want_step;
    int    pos;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (step !== STEP_IDLE) begin failures++; $display("FAIL reset step"); end
    expect_bit(test_mode, 1'b1, "test_mode before test");
    expect_bit(t0 & t1, 1'b1, "both on V_DDH before test");
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      for (int c = 0; c < 3 * STEP_LEN; c++) begin
        want_step = (c < STEP_LEN) ? STEP_INIT : (c < 2 * STEP_LEN) ? STEP_CORE0 : STEP_CORE1;
        pos = c % STEP_LEN;
        if (c == 7) start = 1;        // must be ignored while busy
        if (c == 8) start = 0;
        checks++;
        if (step !== want_step) begin
          failures++;
          $display("FAIL cycle %0d: step %s want %s", c, step.name(), want_step.name());
        end
        expect_bit(clr,       pos == 0,     "clr");
        expect_bit(cmp_en,    pos > PIPE,   "cmp_en");
        expect_bit(busy,      1'b1,         "busy");
        expect_bit(done,      1'b0,         "done");
        expect_bit(test_mode, 1'b1,         "test_mode");
        expect_bit(t0,        want_step != STEP_CORE0, "Test0");
        expect_bit(t1,        want_step != STEP_CORE1, "Test1");
        @(negedge clk);
      end
      checks++;
      if (step !== STEP_DONE) begin failures++; $display("FAIL not done after %0d cycles", 3 * STEP_LEN); end
      expect_bit(done, 1'b1, "done");
      expect_bit(busy, 1'b0, "busy after done");
      expect_bit(test_mode, 1'b0, "test_mode after done");
      expect_bit(cmp_en | clr, 1'b0, "idle controls after done");
      repeat (5) @(negedge clk);
      expect_bit(done, 1'b1, "done holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
