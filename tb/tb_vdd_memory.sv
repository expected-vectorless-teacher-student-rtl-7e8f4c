// tb_vdd_memory: self-checking test of the V_DD memory and its rail selector.
// Runs random clr / wr_en / fail_in / test_mode / test_sel_h sequences against
// a one-bit reference model: clr empties the bit and wins over a write, a
// write with fail_in sets it, otherwise it holds; sel_vddh is test_sel_h while
// test_mode is high and the stored bit otherwise.
module tb_vdd_memory;
  logic clk = 0, rst_n = 0;
  logic clr = 0, wr_en = 0, fail_in = 0, test_mode = 0, test_sel_h = 0;
  logic failed, sel_vddh;
  logic model;
  int checks = 0, failures = 0, sets = 0, clears = 0;

  vdd_memory dut (
    .clk(clk), .rst_n(rst_n), .clr(clr), .wr_en(wr_en), .fail_in(fail_in),
    .test_mode(test_mode), .test_sel_h(test_sel_h), .failed(failed), .sel_vddh(sel_vddh));

  always #5 clk = ~clk;

  task automatic compare();
    checks++;
    if (failed !== model || sel_vddh !== (test_mode ? test_sel_h : model)) begin
      failures++;
      $display("FAIL failed=%b sel=%b model=%b test_mode=%b test_sel_h=%b",
               failed, sel_vddh, model, test_mode, test_sel_h);
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
    model = 1'b0;
    repeat (2) @(posedge clk);
    #1 compare();
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      clr        = ($urandom % 16) == 0;
      wr_en      = ($urandom % 2) == 0;
      fail_in    = ($urandom % 8) == 0;
      test_mode  = ($urandom % 2) == 0;
      test_sel_h = $urandom;
      #1 compare();          // selector is combinational
      @(posedge clk);
      if (clr) begin
        if (model) clears++;
        model = 1'b0;
      end else if (wr_en && fail_in) begin
        if (!model) sets++;
        model = 1'b1;
      end
      #1 compare();
    end
    checks++;
    if (sets == 0 || clears == 0) begin failures++; $display("FAIL set/clear not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
