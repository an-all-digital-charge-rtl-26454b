// event_comparator: decides, on every rising edge, whether Signal(H) (the
// chain powered by the sensed capacitor) arrived before Signal(L) (the chain
// powered by the reference), and runs the Done handshake of the Clk loop.
//
// Parts:
//  * mutex: Ra = Signal(H), Rb = Signal(L). Whichever rising edge comes first
//    is granted. Because only this one arbitration point exists, any
//    metastability stays inside the mutex and only delays the decision.
//  * H-win latch (h_won): set by Aa; cleared only once both events are low
//    again (a NOR of the two). While set it blocks Rb, so that when Signal(H)
//    falls before Signal(L) the mutex cannot hand a stray grant to Rb.
//  * C-element: Done = C(Aa, Signal(L)). Done rises only after H won and L has
//    also arrived, i.e. both chains have finished their run; it falls when
//    both are low again. The signal generator drives Clk = ~Done.
//  * L-win latch (l_won): set by the mutex's Ab grant (Signal(L) first, or the
//    tie resolved to L); it is the Ab output that stops the clock. It is held
//    until start is lowered, ready for the next conversion. While set it
//    blocks Ra, so that Signal(H) falling after Signal(L) in the last round
//    does not produce a stray Aa grant.
// The mutex and C-element and the overall behaviour follow the design's
// description; the two latches' exact form (the description names an SR latch
// and three NOR gates but not how they connect) and the use of start to clear
// the finish flag are this design's own choices. Without a held
// flag, the signal generator's re-arm gate would restart Clk as soon as
// Signal(L) fell.
//
// Interface: sig_h, sig_l (events), start (clears the finish flag while low),
// aa (H won the current comparison), ab (conversion finished), done.
// Fully asynchronous; the latches are intended storage.
module event_comparator (
  input  logic sig_h,
  input  logic sig_l,
  input  logic start,
  output logic aa,
  output logic ab,
  output logic done
);
  timeunit 1ns;
  timeprecision 1ps;

  logic ra_gated, rb_gated, ab_m, h_won, l_won, both_low;

  assign both_low = ~(sig_h | sig_l);
  assign rb_gated = sig_l & ~h_won;
  assign ra_gated = sig_h & ~l_won;

  mutex u_mutex (
    .ra (ra_gated),
    .rb (rb_gated),
    .aa (aa),
    .ab (ab_m)
  );

  // H-win latch: set by Aa, cleared when both events have returned low.
  always_latch begin
    if (aa)            h_won = 1'b1;
    else if (both_low) h_won = 1'b0;
  end

  // Finish latch: set by the Ab grant, cleared while start is low.
  always_latch begin
    if (ab_m)        l_won = 1'b1;
    else if (!start) l_won = 1'b0;
  end

  assign ab = l_won;

  c_element u_done (
    .x1 (aa),
    .x2 (sig_l),
    .y  (done)
  );

  // Done may only be high after the H side won.
  always_comb assert (!(done && ab)) else $error("event_comparator: done and ab both high");
endmodule
