// inv_chain: behavioural model of a chain of STAGES inverters whose supply is
// an analogue voltage (not synthesizable; it stands for a custom cell chain).
//
// Each input transition appears at the output after STAGES single-inverter
// delays, each taken at the supply voltage present when the edge entered the
// chain (qdc_pkg::chain_delay_ns, an alpha-power-law model). The higher the
// supply, the shorter the delay, which is what the converter relies on. With
// an even number of stages the chain is non-inverting. A supply at or below
// the threshold voltage stops the chain: the edge is lost and the output
// holds. Edges are modelled with transport delay, so several may be in
// flight, but in the converter only one ever is.
//
// Interface: vdd (volts), in, out. The output starts low when STAGES is even
// (high when odd), matching an input that starts low. The number of stages
// (16) follows the design; the delay law and its numbers are this model's
// own.
module inv_chain #(
  parameter int unsigned STAGES = 16
) (
  input  var real vdd,
  input  logic    in,
  output logic    out
);
  timeunit 1ns;
  timeprecision 1ps;
  import qdc_pkg::*;

  localparam logic INVERTS = logic'(STAGES % 2);

  initial out = INVERTS;

  always @(in) begin : propagate
    real d;
    d = chain_delay_ns(vdd, STAGES);
    if (d > 0.0) out <= #(d) (in ^ INVERTS);
  end
endmodule
