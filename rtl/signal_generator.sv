// signal_generator: starts, sustains and stops the converter's self-timed Clk.
//
// The inverter chains cannot oscillate on their own, so this block produces
// the trigger Clk that launches each pair of events. The gate network follows
// the published schematic:
//   t   = NAND(qr, ~ab)           re-arms the latch once ab has dropped
//   a1  = AND(start, t)           'AND1'
//   ql  = NAND(a1, qr)            SR latch, set side
//   qr  = NAND(ql, ~ab)           SR latch, reset side (Ab stops the clock)
//   clk = AND(a1, ql, ~done)      'AND2'
// Stage 1 (start = 0): a1 = 0, the latch rests at ql = 1 / qr = 0, clk = 0.
// Stage 2 (start = 1, ab = 0): a1 = ql = 1, so clk = ~done: the comparator's
// Done handshake makes Clk oscillate, one cycle per comparison.
// Stage 3 (ab = 1): the latch flips to ql = 0 / qr = 1 and clk stays 0.
// Only the gate list is given by the design's description; the connection
// list was read off its schematic drawing.
//
// Interface: start (level), ab and done from the event comparator, clk out.
// No clock or reset: the state settles from start = 0. The latch and the
// re-arm gate form intended combinational loops (asynchronous state).
module signal_generator (
  input  logic start,
  input  logic ab,
  input  logic done,
  output logic clk
);
  timeunit 1ns;
  timeprecision 1ps;

  logic n_ab, n_done;
  logic t, a1, ql, qr;

  assign n_ab   = ~ab;
  assign n_done = ~done;

  assign t   = ~(qr & n_ab);
  assign a1  = start & t;
  assign ql  = ~(a1 & qr);
  assign qr  = ~(ql & n_ab);
  assign clk = a1 & ql & n_done;
endmodule
