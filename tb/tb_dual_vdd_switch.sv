// tb_dual_vdd_switch: test of the behavioural supply-switch model.
// For every combination of rail select and the two per-rail failure inputs,
// checks that on_vddh follows the select and supply_fault reports the failure
// of the selected rail once SWITCH_DELAY has passed, and that the outputs have
// not yet changed before it.
module tb_dual_vdd_switch;
  localparam int unsigned DELAY = 3;

  logic sel = 0, fh = 0, fl = 0;
  logic on_vddh, supply_fault;
  int checks = 0, failures = 0;

  dual_vdd_switch #(.SWITCH_DELAY(DELAY)) dut (
    .sel_vddh(sel), .fails_at_vddh(fh), .fails_at_vddl(fl),
    .on_vddh(on_vddh), .supply_fault(supply_fault));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic old_on, old_fault;
    #10;
    for (int r = 0; r < 3; r++) begin
      for (int k = 0; k < 8; k++) begin
        old_on    = on_vddh;
        old_fault = supply_fault;
        {sel, fh, fl} = 3'(k);
        #1;
        checks++;
        if (on_vddh !== old_on || supply_fault !== old_fault) begin
          failures++;
          $display("FAIL outputs changed before the switch delay (k=%0d)", k);
        end
        #(DELAY);
        checks++;
        if (on_vddh !== sel || supply_fault !== (sel ? fh : fl)) begin
          failures++;
          $display("FAIL k=%0d on_vddh=%b supply_fault=%b", k, on_vddh, supply_fault);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
