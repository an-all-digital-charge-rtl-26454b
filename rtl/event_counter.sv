// event_counter: binary counter of the rising edges of Clk; its value is the
// converter's output code D_out.
//
// Built as the design describes it: WIDTH toggle flip-flops (JK flip-flops
// with J and K tied together), all clocked by Clk, with an AND chain forming
// the toggle enables. Bit 0 always toggles (its J=K is tied high); bit n
// toggles when bits 0..n-1 are all 1. The result counts 0, 1, 2, ... and wraps
// to 0 after 2^WIDTH - 1. The description tabulates the count only up to that
// point.
//
// Interface: clk (Clk from the signal generator), rst_n (asynchronous clear,
// active low; the description has no reset, so the clear is this design's
// own addition), d_out (the count). d_out changes one register delay after
// each rising edge of clk.
module event_counter #(
  parameter int unsigned WIDTH = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [WIDTH-1:0] d_out
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [WIDTH-1:0] tog;  // J = K input of each flip-flop

  // AND carry chain: bit i toggles when all lower bits are 1.
  always_comb begin
    logic carry;
    carry = 1'b1;
    for (int i = 0; i < WIDTH; i++) begin
      tog[i] = carry;
      carry  = carry & d_out[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) d_out <= '0;
    else        d_out <= d_out ^ tog;  // JK with J = K: toggle when enabled
  end
endmodule
