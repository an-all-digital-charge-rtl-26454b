// qdc_top: the complete charge-to-digital converter.
//
// A sensed capacitor C_SENSE is charged to V_HIGH and then powers a chain of
// inverters. A trigger (Clk) is launched into that chain and, at the same
// moment, into an identical chain powered by a fixed reference V_LOW. Every
// edge drains a little charge from C_SENSE, so V_SENSE falls step by step.
// As long as the capacitor-powered chain answers first (Signal(H) before
// Signal(L)) the loop runs another round; the first time the reference chain
// answers first, the loop stops. The number of rounds is the output code:
// linear in C_SENSE for a fixed V_HIGH, logarithmic in V_HIGH for a fixed
// C_SENSE.
//
// Loop: signal_generator -> Clk -> level_shifter -> event_generator (two
// chains) -> event_comparator -> Done/Ab -> signal_generator. The counter
// counts the rising edges of Clk, including the final round in which the
// reference wins. All of it is self-timed: there is no system clock.
//
// The signal generator, event comparator and counter are synthesizable
// logic; the capacitor with its switches, the level shifter and the inverter
// chains are behavioural models with real-valued supplies, so this top level
// is for simulation.
//
// Operation: hold start low and precharge high (capacitor charges), pulse
// rst_n low to clear the code, lower precharge, raise discharge, then raise
// start. finished (Ab) rises at the end of the conversion and d_out then
// holds the code. Lower start to prepare the next conversion. The loop's
// internal events are brought out for observation: clk, sig_h, sig_l, done,
// aa (Signal(H) won the current round) and v_sense.
module qdc_top #(
  parameter int unsigned STAGES      = qdc_pkg::INV_CHAIN_STAGES,
  parameter int unsigned COUNT_W     = qdc_pkg::COUNTER_BITS,
  parameter real         CP_INV_PF   = 0.0078,  // switched cap per rising inverter
  parameter real         LS_DELAY_NS = 0.05
) (
  input  logic               rst_n,
  input  logic               precharge,
  input  logic               discharge,
  input  logic               start,
  input  var real            v_high,
  input  var real            v_low,
  input  var real            c_sense_pf,
  output logic [COUNT_W-1:0] d_out,
  output logic               finished,
  output logic               aa,
  output logic               clk,
  output logic               sig_h,
  output logic               sig_l,
  output logic               done,
  output real                v_sense
);
  timeunit 1ns;
  timeprecision 1ps;

  // Half of the inverters of the chain switch low-to-high on every edge.
  localparam real C_LOAD_PF = CP_INV_PF * real'(STAGES / 2);

  // clk_up_n, clk_up_level_v and v_cap are observation points: the chains
  // take the logic-level Clk_up only, and v_cap is the unswitched cap node.
  logic clk_up, clk_up_n;
  real  v_cap, clk_up_level_v;

  charge_discharge #(.C_LOAD_PF(C_LOAD_PF)) u_cap (
    .precharge  (precharge),
    .discharge  (discharge),
    .v_high     (v_high),
    .c_sense_pf (c_sense_pf),
    .load_edge  (sig_h),
    .v_cap      (v_cap),
    .v_sense    (v_sense)
  );

  signal_generator u_sig (
    .start (start),
    .ab    (finished),
    .done  (done),
    .clk   (clk)
  );

  level_shifter #(.DELAY_NS(LS_DELAY_NS)) u_ls (
    .clk          (clk),
    .v_sense      (v_sense),
    .out1         (clk_up),
    .out2         (clk_up_n),
    .out1_level_v (clk_up_level_v)
  );

  event_generator #(.STAGES(STAGES)) u_evg (
    .clk_up  (clk_up),
    .v_sense (v_sense),
    .v_low   (v_low),
    .sig_h   (sig_h),
    .sig_l   (sig_l)
  );

  event_comparator u_cmp (
    .sig_h (sig_h),
    .sig_l (sig_l),
    .start (start),
    .aa    (aa),
    .ab    (finished),
    .done  (done)
  );

  event_counter #(.WIDTH(COUNT_W)) u_cnt (
    .clk   (clk),
    .rst_n (rst_n),
    .d_out (d_out)
  );
endmodule
