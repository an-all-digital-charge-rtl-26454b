// level_shifter: behavioural model of the cross-coupled level shifter that
// lifts Clk from the V_LOW domain to the V_SENSE domain (not synthesizable;
// in silicon it is a transistor-level cell).
//
// The cell has an input buffer, two NMOS pull-downs driven by Clk and by its
// inverse (the inverter is supplied from V_LOW), two cross-coupled PMOS loads
// on V_SENSE and an output buffer. The logic value passes through unchanged
// and only the level of a logic 1 changes, from V_LOW to V_SENSE. The model
// therefore copies clk to out1 after DELAY_NS (transport delay; the value is
// this model's own choice), gives out2 as the complementary internal node and
// reports the analogue level of out1 as out1_level_v. The cell's own current
// draw from V_SENSE is not modelled.
//
// Interface: clk in, v_sense (volts), out1 (level-shifted Clk), out2
// (complement), out1_level_v (volts).
module level_shifter #(
  parameter real DELAY_NS = 0.05
) (
  input  logic    clk,
  input  var real v_sense,
  output logic    out1,
  output logic    out2,
  output real     out1_level_v
);
  timeunit 1ns;
  timeprecision 1ps;

  initial out1 = 1'b0;

  always @(clk) out1 <= #(DELAY_NS) clk;

  assign out2 = ~out1;

  always_comb out1_level_v = out1 ? v_sense : 0.0;
endmodule
