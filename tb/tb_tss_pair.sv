// tb_tss_pair: self-checking test of one teacher-student pair.
// A TSS controller (TEST_CYCLES = 64) drives the pair through the whole flow
// once for each of the 16 combinations of the per-core, per-rail failure
// inputs. Expected results, from the flow:
//   disabled       = either core fails on V_DDH (seen in the initial test)
//   core_failed[c] = core c fails on V_DDL   (only checked for pairs not
//                                              disabled: the teacher works)
//   after done, the rail of core c = core_failed[c].
// During each step the rails are checked as well: both V_DDH in Step1, the
// student alone on V_DDL in Steps 2 and 3.
module tb_tss_pair;
  import tss_pkg::*;

  localparam int unsigned T = 64;

  logic       clk = 0, rst_n = 0, start = 0;
  step_e      step;
  logic       clr, cmp_en, test_mode, t0, t1, busy, done;
  logic [1:0] fh = '0, fl = '0;
  logic       pass_fail, disabled;
  logic [1:0] core_vddh, core_failed;
  int checks = 0, failures = 0;
  int n_disabled = 0, n_student_fail = 0, n_student_pass = 0;

  tss_controller #(.TEST_CYCLES(T)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .step(step), .clr(clr), .cmp_en(cmp_en),
    .test_mode(test_mode), .test0_sel_h(t0), .test1_sel_h(t1), .busy(busy), .done(done));

  tss_pair dut (
    .clk(clk), .rst_n(rst_n), .step(step), .clr(clr), .cmp_en(cmp_en),
    .test_mode(test_mode), .test0_sel_h(t0), .test1_sel_h(t1),
    .fails_at_vddh(fh), .fails_at_vddl(fl), .pass_fail(pass_fail),
    .core_vddh(core_vddh), .core_failed(core_failed), .disabled(disabled));

  always #5 clk = ~clk;

  task automatic expect_v(input logic [1:0] got, input logic [1:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL fh=%b fl=%b %s: got %b want %b", fh, fl, what, got, want);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic want_dis;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 16; k++) begin
      {fh, fl} = 4'(k);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      // middle of each step: rails as the flow prescribes
      repeat (T / 2) @(negedge clk);
      expect_v(core_vddh, 2'b11, "rails in Step1");
      wait (step == STEP_CORE0);
      repeat (T / 2) @(negedge clk);
      expect_v(core_vddh, 2'b10, "rails in Step2");
      wait (step == STEP_CORE1);
      repeat (T / 2) @(negedge clk);
      expect_v(core_vddh, 2'b01, "rails in Step3");
      wait (done);
      @(negedge clk);
      want_dis = |fh;
      expect_v({1'b0, disabled}, {1'b0, want_dis}, "disabled");
      if (want_dis) n_disabled++;
      if (!want_dis) begin
        expect_v(core_failed, fl, "V_DD memories");
        expect_v(core_vddh, fl, "rails after the test");
        for (int c = 0; c < 2; c++) if (fl[c]) n_student_fail++; else n_student_pass++;
      end else begin
        expect_v(core_vddh, core_failed, "rails follow memories");
      end
    end
    checks++;
    if (n_disabled == 0 || n_student_fail == 0 || n_student_pass == 0) begin
      failures++;
      $display("FAIL outcome not exercised");
    end
    $display("disabled=%0d student_fail=%0d student_pass=%0d", n_disabled, n_student_fail, n_student_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
