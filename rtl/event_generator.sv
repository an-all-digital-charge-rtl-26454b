// event_generator: the two inverter chains that turn each Clk edge into a
// pair of events, Signal(H) and Signal(L) (behavioural: the chains are
// analogue-supplied cells).
//
// Both chains have STAGES inverters and receive the same level-shifted Clk.
// The upper chain is supplied from V_SENSE, the voltage of the sensed
// capacitor, the lower one from the fixed reference V_LOW. While V_SENSE is
// above V_LOW the upper chain is faster and Signal(H) leads Signal(L); as the
// capacitor discharges the lead shrinks and finally reverses. The structure
// and the 16 stages follow the design; the delay law is the chains' model.
//
// Interface: clk_up (level-shifted Clk), v_sense and v_low (volts), sig_h and
// sig_l (events). Delay per edge: STAGES times the inverter delay at the
// chain's supply.
module event_generator #(
  parameter int unsigned STAGES = 16
) (
  input  logic    clk_up,
  input  var real v_sense,
  input  var real v_low,
  output logic    sig_h,
  output logic    sig_l
);
  timeunit 1ns;
  timeprecision 1ps;

  inv_chain #(.STAGES(STAGES)) u_upper (
    .vdd (v_sense),
    .in  (clk_up),
    .out (sig_h)
  );

  inv_chain #(.STAGES(STAGES)) u_lower (
    .vdd (v_low),
    .in  (clk_up),
    .out (sig_l)
  );
endmodule
