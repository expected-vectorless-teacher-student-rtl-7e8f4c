// tss_pair: one teacher-student pair of the multi-core array.
// Its LFSR feeds the same pseudo-random pattern to core 0 and core 1 every
// clock; each core is powered through its own dual-V_DD switch; the XOR
// comparator checks the two 17-bit outputs (pass_fail, live, 1 = differ).
// During the test the controller's step says which result store the
// comparison goes to while cmp_en is high:
//   STEP_INIT  -> disabled (initial test, both cores on V_DDH)
//   STEP_CORE0 -> V_DD memory of core 0 (core 0 student on V_DDL)
//   STEP_CORE1 -> V_DD memory of core 1 (core 1 student on V_DDL)
// Each store is emptied by clr at the start of its own step. Once test_mode
// drops, each core's rail is its V_DD memory bit: V_DDL if it passed, V_DDH
// if it failed. disabled marks a pair whose cores disagree even with both on
// V_DDH; such a pair is to be replaced by spare cores, which are not part of
// this design. The level shifters between the core outputs and the
// comparator are voltage-domain crossings with no logic function and do not
// appear here.
// The modelled supply errors hit the carry-out bit in core 0 and the top sum
// bit in core 1 (FAULT_BIT).
// The pair's contents (LFSR, two cores, XOR, two V_DD memories, the switches)
// follow the chip; the disabled bit and the step-to-store routing are this
// design's reading of the test flow.
module tss_pair
  import tss_pkg::*;
#(
  parameter int unsigned        WIDTH = CORE_WIDTH,
  parameter logic [2*WIDTH-1:0] SEED  = 32'h0000_0001
) (
  input  logic       clk,
  input  logic       rst_n,
  input  step_e      step,
  input  logic       clr,
  input  logic       cmp_en,
  input  logic       test_mode,
  input  logic       test0_sel_h,
  input  logic       test1_sel_h,
  input  logic [1:0] fails_at_vddh,
  input  logic [1:0] fails_at_vddl,
  output logic       pass_fail,
  output logic [1:0] core_vddh,
  output logic [1:0] core_failed,
  output logic       disabled
);
  logic [2*WIDTH-1:0] pattern;
  logic [WIDTH:0]     dout [2];
  logic [1:0]         sel_vddh;
  logic [1:0]         supply_fault;
  logic [1:0]         test_sel_h;
  logic [1:0]         mem_clr;
  logic [1:0]         mem_wr;

  lfsr32 #(.WIDTH(2*WIDTH), .SEED(SEED)) u_lfsr (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (1'b1),
    .q    (pattern)
  );

  assign test_sel_h = {test1_sel_h, test0_sel_h};
  assign mem_clr    = {clr && (step == STEP_CORE1), clr && (step == STEP_CORE0)};
  assign mem_wr     = {cmp_en && (step == STEP_CORE1), cmp_en && (step == STEP_CORE0)};

  for (genvar c = 0; c < 2; c++) begin : g_core
    vdd_memory u_mem (
      .clk       (clk),
      .rst_n     (rst_n),
      .clr       (mem_clr[c]),
      .wr_en     (mem_wr[c]),
      .fail_in   (pass_fail),
      .test_mode (test_mode),
      .test_sel_h(test_sel_h[c]),
      .failed    (core_failed[c]),
      .sel_vddh  (sel_vddh[c])
    );

    dual_vdd_switch u_switch (
      .sel_vddh     (sel_vddh[c]),
      .fails_at_vddh(fails_at_vddh[c]),
      .fails_at_vddl(fails_at_vddl[c]),
      .on_vddh      (core_vddh[c]),
      .supply_fault (supply_fault[c])
    );

    tss_core #(.WIDTH(WIDTH), .FAULT_BIT(WIDTH - c)) u_core (
      .clk         (clk),
      .rst_n       (rst_n),
      .din         (pattern),
      .supply_fault(supply_fault[c]),
      .dout        (dout[c])
    );
  end

  pair_comparator #(.WIDTH(WIDTH + 1)) u_cmp (
    .a   (dout[0]),
    .b   (dout[1]),
    .fail(pass_fail)
  );

  // Result of the initial test: both cores teachers, any mismatch disables the pair.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                         disabled <= 1'b0;
    else if (clr && step == STEP_INIT)                  disabled <= 1'b0;
    else if (cmp_en && step == STEP_INIT && pass_fail)  disabled <= 1'b1;
  end
endmodule
