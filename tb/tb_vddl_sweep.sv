// tb_vddl_sweep: V_DDL sweep of the 64-core chip, counting error cores.
// Each core is given a minimum working supply drawn at random from a range;
// V_DDH is the highest of them, so every core works on V_DDH. V_DDL is then
// stepped downwards and at each point the full TSS test is run on the chip at
// its default size; the cores are told they fail on V_DDL when their minimum
// supply is above it. At every point the testbench checks that the number of
// cores the chip kept on V_DDH equals the number whose minimum supply exceeds
// V_DDL, core by core, that no pair is disabled, and that the count never
// falls as V_DDL is lowered. Two corners are swept:
//   delay-error mode    (fast clock): minimum supplies 370..388 mV
//   function-error mode (slow clock): minimum supplies 178..280 mV
// A sweep point is one complete test of 3081 cycles.
module tb_vddl_sweep;
  import tss_pkg::*;

  localparam int unsigned NC = 64;

  logic            clk = 0, rst_n = 0, start = 0;
  logic [NC-1:0]   fh = '0, fl = '0;
  logic            busy, done;
  step_e           step;
  logic [NC/2-1:0] pass_fail, pair_disabled;
  logic [NC-1:0]   core_vddh, core_failed;
  int unsigned     vmin [NC];
  int checks = 0, failures = 0, points = 0;

  tss_chip dut (
    .clk(clk), .rst_n(rst_n), .start(start), .fails_at_vddh(fh), .fails_at_vddl(fl),
    .busy(busy), .done(done), .step(step), .pass_fail(pass_fail), .core_vddh(core_vddh),
    .core_failed(core_failed), .pair_disabled(pair_disabled));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sweep(input string mode, input int unsigned lo, input int unsigned hi,
                       input int unsigned step_mv);
    int unsigned vddh, vddl, prev, n_err, n_want;
    vddh = 0;
    for (int i = 0; i < NC; i++) begin
      vmin[i] = lo + ($urandom % (hi - lo + 1));
      if (vmin[i] > vddh) vddh = vmin[i];
    end
    prev = 0;
    $display("%s: V_DDH = %0d mV", mode, vddh);
    for (vddl = vddh; vddl + step_mv >= lo; vddl -= step_mv) begin
      for (int i = 0; i < NC; i++) fl[i] = (vmin[i] > vddl);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      wait (done);
      @(negedge clk);
      points++;
      n_err  = $countones(core_vddh);
      n_want = $countones(fl);
      checks++;
      if (core_vddh !== fl || pair_disabled !== '0) begin
        failures++;
        $display("FAIL %s V_DDL=%0d: on V_DDH %h want %h, disabled %h", mode, vddl, core_vddh, fl, pair_disabled);
      end
      checks++;
      if (n_err < prev) begin
        failures++;
        $display("FAIL %s: error cores fell from %0d to %0d as V_DDL dropped", mode, prev, n_err);
      end
      if (vddl == vddh) begin
        checks++;
        if (n_err != 0) begin failures++; $display("FAIL %s: error cores at V_DDL = V_DDH", mode); end
      end
      prev = n_err;
      $display("%s V_DDL=%0d mV: error cores %0d of %0d (expected %0d)", mode, vddl, n_err, NC, n_want);
      if (vddl < step_mv) break;
    end
    // the sweep ends below the lowest minimum supply: by then some cores must fail
    checks++;
    if (prev == 0) begin
      failures++;
      $display("FAIL %s: no error core at the lowest V_DDL", mode);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    sweep("delay-error mode", 370, 388, 2);
    sweep("function-error mode", 178, 280, 10);
    $display("sweep points run: %0d", points);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
