// charge_discharge: behavioural model of the sensed capacitor C_SENSE and its
// two switches, Precharge and Discharge (not synthesizable: analogue).
//
// While precharge is high the capacitor follows v_high (ideal, instant
// charging). With precharge low and discharge high the capacitor supplies the
// upper inverter chain, and every transition that travels down that chain
// charges the parasitic capacitance of the inverters whose outputs rise. That
// charge comes from C_SENSE, so each transition shares its charge as
//   V[i+1] = V[i] * C_SENSE / (C_SENSE + C_LOAD)
// which is the design's discharge model. C_LOAD_PF is the capacitance
// switched per transition (half the stages of the chain rise on every edge);
// its value is this model's own, chosen so that the code for 50 pF charged to
// 0.8 V against a 0.45 V reference comes out near 232. A transition is seen
// as any change of load_edge, which is wired to the upper chain's output. The
// charge drawn by the level shifter and leakage are not modelled.
//
// Interface: precharge, discharge (switch controls), v_high (charging source,
// volts), c_sense_pf (capacitance in pF), load_edge (Signal(H)), v_cap
// (capacitor voltage) and v_sense (supply seen by the upper chain: v_cap while
// discharge is closed, else 0).
module charge_discharge #(
  parameter real C_LOAD_PF = 0.0624
) (
  input  logic    precharge,
  input  logic    discharge,
  input  var real v_high,
  input  var real c_sense_pf,
  input  logic    load_edge,
  output real     v_cap,
  output real     v_sense
);
  timeunit 1ns;
  timeprecision 1ps;
  import qdc_pkg::*;

  logic last_edge;

  initial begin
    v_cap     = 0.0;
    last_edge = 1'b0;
  end

  always @(precharge or v_high or load_edge) begin
    if (load_edge != last_edge) begin
      last_edge = load_edge;
      if (discharge && !precharge) v_cap = share_charge(v_cap, c_sense_pf, C_LOAD_PF);
    end
    if (precharge) v_cap = v_high;
  end

  always_comb v_sense = discharge ? v_cap : 0.0;
endmodule
