// c_element: Muller C-element, the rendezvous gate of self-timed logic.
//
// The output goes to 1 when both inputs are 1, to 0 when both are 0, and
// holds its previous value while the inputs disagree:
//   x1 x2 | y
//    0  0 | 0
//    0  1 | y (held)
//    1  0 | y (held)
//    1  1 | 1
// It is written as a latch that is transparent while the inputs agree, which
// is exactly the truth table above. No clock; the output changes as soon as
// the inputs agree. The latch is intended: holding state is its function.
module c_element (
  input  logic x1,
  input  logic x2,
  output logic y
);
  timeunit 1ns;
  timeprecision 1ps;

  always_latch begin
    if (x1 == x2) y = x1;
  end
endmodule
