// tb_tss_chip: end-to-end test of the 64-core chip at its full size
// (32 pairs, 1024 compare cycles per step, no parameter overrides).
// Three complete TSS tests are run, each on a different description of which
// cores fail on which rail: the first four pairs are fixed cases (all good,
// core 0 weak at V_DDL, core 1 weak at V_DDL, both weak), pair 4 has a core
// that fails even on V_DDH, and the other pairs are random. The third run
// makes every core good again, so results stored by earlier runs must be
// cleared. For each run the testbench checks
//   - the start-to-done latency, 3 * (1 + 2 + 1024) cycles,
//   - the rails of all 64 cores in the middle of each step,
//   - after done: pair_disabled, the V_DD memory of every core of a working
//     pair, and that each core's rail is its memory bit.
// It counts how often each mechanism of the flow happened (pair disabled by
// the initial test, student passing / failing in Step2 and Step3, core moved
// to V_DDL, live mismatch, a stored failure cleared by a later test) and
// counts a failure for any that never happened.
module tb_tss_chip;
  import tss_pkg::*;

  localparam int unsigned NP   = 32;
  localparam int unsigned T    = 1024;
  localparam int unsigned LAT  = 3 * (1 + CORE_PIPE_DEPTH + T);

  logic              clk = 0, rst_n = 0, start = 0;
  logic [2*NP-1:0]   fh = '0, fl = '0;
  logic              busy, done;
  step_e             step;
  logic [NP-1:0]     pass_fail, pair_disabled;
  logic [2*NP-1:0]   core_vddh, core_failed;
  logic [2*NP-1:0]   prev_failed;
  int checks = 0, failures = 0;
  int n_disabled = 0, n_s2_pass = 0, n_s2_fail = 0, n_s3_pass = 0, n_s3_fail = 0;
  int n_on_vddl = 0, n_mismatch_cycles = 0, n_cleared = 0;

  tss_chip dut (
    .clk(clk), .rst_n(rst_n), .start(start), .fails_at_vddh(fh), .fails_at_vddl(fl),
    .busy(busy), .done(done), .step(step), .pass_fail(pass_fail), .core_vddh(core_vddh),
    .core_failed(core_failed), .pair_disabled(pair_disabled));

  always #5 clk = ~clk;

  always @(posedge clk) if (busy && |pass_fail) n_mismatch_cycles++;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2*NP-1:0] rails(input step_e s);
    logic [2*NP-1:0] r;
    for (int p = 0; p < NP; p++) begin
      r[2*p]   = (s != STEP_CORE0);
      r[2*p+1] = (s != STEP_CORE1);
    end
    return r;
  endfunction

  task automatic expect_vec(input logic [2*NP-1:0] got, input logic [2*NP-1:0] want,
                            input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  task automatic run_test(input int run);
    int cycles;
    logic [NP-1:0] want_dis;
    step_e s;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 0;
    // walk the test, checking rails in the middle of each compare window
    while (!done && cycles < 2 * LAT) begin
      s = step;
      if (cycles % (LAT / 3) == (LAT / 6)) expect_vec(core_vddh, rails(s), $sformatf("rails in %s", s.name()));
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != LAT) begin
      failures++;
      $display("FAIL run %0d: done after %0d cycles, want %0d", run, cycles, LAT);
    end
    for (int p = 0; p < NP; p++) want_dis[p] = fh[2*p] | fh[2*p+1];
    expect_vec({{NP{1'b0}}, pair_disabled}, {{NP{1'b0}}, want_dis}, "pair_disabled");
    for (int p = 0; p < NP; p++) begin
      if (want_dis[p]) begin
        n_disabled++;
        continue;
      end
      checks++;
      if (core_failed[2*p +: 2] !== fl[2*p +: 2]) begin
        failures++;
        $display("FAIL run %0d pair %0d: memories %b want %b", run, p, core_failed[2*p +: 2], fl[2*p +: 2]);
      end
      if (fl[2*p]) n_s2_fail++; else n_s2_pass++;
      if (fl[2*p+1]) n_s3_fail++; else n_s3_pass++;
      for (int c = 0; c < 2; c++)
        if (prev_failed[2*p+c] && !fl[2*p+c]) n_cleared++;
    end
    expect_vec(core_vddh, core_failed, "rails follow the V_DD memories");
    for (int i = 0; i < 2 * NP; i++) if (!core_vddh[i]) n_on_vddl++;
    prev_failed = core_failed;
    $display("run %0d: %0d cycles, disabled pairs %h, cores on V_DDH %h", run, cycles, pair_disabled, core_vddh);
  endtask

  initial begin
    prev_failed = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      for (int i = 0; i < 2 * NP; i++) begin
        fh[i] = (run < 2) && (($urandom % 16) == 0);
        fl[i] = (run < 2) && (($urandom % 3) == 0);
      end
      if (run < 2) begin
        fh[9:0] = 10'b01_00_00_00_00;   // pair 4: core 0 fails even on V_DDH
        fl[7:0] = 8'b11_10_01_00;       // pairs 0..3: fixed V_DDL cases
      end
      run_test(run);
    end
    checks++;
    if (n_disabled == 0 || n_s2_pass == 0 || n_s2_fail == 0 || n_s3_pass == 0 ||
        n_s3_fail == 0 || n_on_vddl == 0 || n_mismatch_cycles == 0 || n_cleared == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("mechanisms: disabled=%0d step2_pass=%0d step2_fail=%0d step3_pass=%0d step3_fail=%0d on_vddl=%0d mismatch_cycles=%0d cleared=%0d",
             n_disabled, n_s2_pass, n_s2_fail, n_s3_pass, n_s3_fail, n_on_vddl, n_mismatch_cycles, n_cleared);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
