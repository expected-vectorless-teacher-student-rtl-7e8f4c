// tss_chip: the homogeneous multi-core chip with Teacher-Student Swap test.
// N_PAIRS teacher-student pairs (64 cores, drawn as an 8 x 8 array on the
// chip) share one TSS controller and are tested in parallel. After start the
// controller runs the three-step flow on all pairs at once; when done rises,
// every core that matched its teacher while on V_DDL stays on V_DDL, every
// core that did not is kept on V_DDH, and pairs that failed even with both
// cores on V_DDH are flagged in pair_disabled. Only these pass/fail results
// leave the chip: no expected vectors are needed from outside.
// Core c of pair p is bit 2p+c of the per-core buses. fails_at_vddh and
// fails_at_vddl are inputs of the supply-switch models, describing which
// cores do not work on which rail; they are not pins of a real chip.
// The number of pairs and the contents of a pair follow the chip; the shared
// on-chip controller, the port list and TEST_CYCLES are this design's choice.
module tss_chip
  import tss_pkg::*;
#(
  parameter int unsigned N_PAIRS     = 32,
  parameter int unsigned WIDTH       = CORE_WIDTH,
  parameter int unsigned TEST_CYCLES = 1024
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [2*N_PAIRS-1:0] fails_at_vddh,
  input  logic [2*N_PAIRS-1:0] fails_at_vddl,
  output logic                 busy,
  output logic                 done,
  output step_e                step,
  output logic [N_PAIRS-1:0]   pass_fail,
  output logic [2*N_PAIRS-1:0] core_vddh,
  output logic [2*N_PAIRS-1:0] core_failed,
  output logic [N_PAIRS-1:0]   pair_disabled
);
  logic clr, cmp_en, test_mode, test0_sel_h, test1_sel_h;

  tss_controller #(.TEST_CYCLES(TEST_CYCLES), .PIPE_DEPTH(CORE_PIPE_DEPTH)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .step       (step),
    .clr        (clr),
    .cmp_en     (cmp_en),
    .test_mode  (test_mode),
    .test0_sel_h(test0_sel_h),
    .test1_sel_h(test1_sel_h),
    .busy       (busy),
    .done       (done)
  );

  for (genvar p = 0; p < N_PAIRS; p++) begin : g_pair
    tss_pair #(.WIDTH(WIDTH)) u_pair (
      .clk          (clk),
      .rst_n        (rst_n),
      .step         (step),
      .clr          (clr),
      .cmp_en       (cmp_en),
      .test_mode    (test_mode),
      .test0_sel_h  (test0_sel_h),
      .test1_sel_h  (test1_sel_h),
      .fails_at_vddh(fails_at_vddh[2*p +: 2]),
      .fails_at_vddl(fails_at_vddl[2*p +: 2]),
      .pass_fail    (pass_fail[p]),
      .core_vddh    (core_vddh[2*p +: 2]),
      .core_failed  (core_failed[2*p +: 2]),
      .disabled     (pair_disabled[p])
    );
  end
endmodule
