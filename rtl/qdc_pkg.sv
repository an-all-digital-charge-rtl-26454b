// qdc_pkg: constants and the supply-dependent delay law shared by the
// behavioural models of the converter's analogue side.
//
// The converter measures how long a capacitor-powered inverter chain takes
// against an identical chain powered by a fixed reference. Only the ordering
// of those delays matters to the digital logic, so any law in which delay
// falls monotonically as the supply rises reproduces the behaviour. This
// package uses the alpha-power law, t = k * Vdd / (Vdd - Vth)^alpha, with
// numbers typical of a 90 nm process; these numbers are this model's own
// choice and are not taken from the design's description. A chain whose
// supply is at or below Vth does not switch at all (delay reported as -1).
package qdc_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  // Default widths and sizes used by the design.
  localparam int unsigned INV_CHAIN_STAGES = 16;  // stages per inverter chain
  localparam int unsigned COUNTER_BITS     = 20;  // width of the output code

  // Inverter delay model (alpha-power law).
  localparam real VTH_V         = 0.30;   // threshold voltage, volts
  localparam real ALPHA         = 1.30;   // velocity-saturation index
  localparam real T_INV_AT_1V_NS = 0.030; // single inverter delay at 1.0 V, ns

  // Delay of one inverter at supply vdd, in ns; -1.0 when it cannot switch.
  function automatic real inv_delay_ns(input real vdd);
    real k;
    if (vdd <= VTH_V) return -1.0;
    k = T_INV_AT_1V_NS * ((1.0 - VTH_V) ** ALPHA);
    return k * vdd / ((vdd - VTH_V) ** ALPHA);
  endfunction

  // Delay of a chain of `stages` inverters at supply vdd, in ns.
  function automatic real chain_delay_ns(input real vdd, input int unsigned stages);
    real d;
    d = inv_delay_ns(vdd);
    if (d < 0.0) return -1.0;
    return d * real'(stages);
  endfunction

  // Charge sharing of one discharge step (Eq. V[i+1] = V[i] * C / (C + Cp)).
  function automatic real share_charge(input real v, input real c_pf, input real cp_pf);
    return v * c_pf / (c_pf + cp_pf);
  endfunction
endpackage
