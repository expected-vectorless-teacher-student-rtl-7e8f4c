// dual_vdd_switch: behavioural model, not synthesizable logic.
// Models the pair of pMOS power switches (driven through an inverter) that
// connects a core to V_DDH or V_DDL. A two-state logic simulation cannot carry
// supply voltages, so the model reports instead whether the core misbehaves on
// the rail it is connected to: fails_at_vddh / fails_at_vddl describe the core
// (its process variation), and supply_fault is the entry for the selected
// rail. on_vddh tells which rail the core is on (1 = V_DDH). Both outputs
// follow their inputs after SWITCH_DELAY time units, standing for the switch
// settling; the delay value is this design's choice.
module dual_vdd_switch #(
  parameter int unsigned SWITCH_DELAY = 1
) (
  input  logic sel_vddh,
  input  logic fails_at_vddh,
  input  logic fails_at_vddl,
  output logic on_vddh,
  output logic supply_fault
);
  assign #(SWITCH_DELAY) on_vddh      = sel_vddh;
  assign #(SWITCH_DELAY) supply_fault = sel_vddh ? fails_at_vddh : fails_at_vddl;
endmodule
