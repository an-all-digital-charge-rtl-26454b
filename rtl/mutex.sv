// mutex: two-way mutual exclusion element (arbiter) for asynchronous requests.
//
// Two requests, ra and rb, arrive with independent timing; at most one of the
// grants aa/ab is high at any time. The first request to arrive wins and keeps
// its grant until it is withdrawn; a later request waits. The element is the
// usual cross-coupled NAND latch followed by a metastability filter: a grant
// is only issued when the two latch nodes x1/x2 have fully separated, so in
// silicon a metastable latch delays the decision but never shows a middle
// value. In this logic model the filter is the AND of one node with the other
// node's inverse. When both requests rise at exactly the same instant either
// grant is a correct outcome; the model settles on one of them.
//
// Interface: ra/rb requests (Signal(H)/Signal(L) in the converter), aa/ab
// grants. Purely combinational with feedback, no clock. The NAND latch is a
// deliberate combinational loop: it is the storage of the arbiter.
module mutex (
  input  logic ra,
  input  logic rb,
  output logic aa,
  output logic ab
);
  timeunit 1ns;
  timeprecision 1ps;

  logic x1, x2;  // the two nodes of the NAND latch

  assign x1 = ~(ra & x2);
  assign x2 = ~(rb & x1);

  // Metastability filter: grant only when the nodes differ.
  assign aa = ~x1 & x2;
  assign ab = ~x2 & x1;

  // At most one grant at a time.
  always_comb assert (!(aa && ab)) else $error("mutex: both grants high");
endmodule
