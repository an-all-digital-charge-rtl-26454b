// tb_event_comparator: drives the two event inputs as the inverter chains
// would and checks the comparator's outputs after every step.
//  * Signal(H) first: Aa rises; Done rises only when Signal(L) arrives; Done
//    falls only when both events are low again; Ab never rises, even if
//    Signal(H) falls while Signal(L) is still high.
//  * Signal(L) first: Ab rises and stays high after both events fall, until
//    start is lowered.
//  * Simultaneous edges: exactly one of the two outcomes.
// Rounds with random orderings are compared against a reference model.
module tb_event_comparator;
  timeunit 1ns;
  timeprecision 1ps;

  logic sig_h, sig_l, start, aa, ab, done;
  int checks = 0, failures = 0;

  event_comparator dut (.sig_h(sig_h), .sig_l(sig_l), .start(start),
                        .aa(aa), .ab(ab), .done(done));

  task automatic expect_out(input logic eaa, input logic eab, input logic edone,
                            input string what);
    #1;
    checks++;
    if (aa !== eaa || ab !== eab || done !== edone) begin
      failures++;
      $display("FAIL %s: aa=%b ab=%b done=%b expected %b %b %b",
               what, aa, ab, done, eaa, eab, edone);
    end
  endtask

  // One H-wins round; l_falls_first chooses the order of the falling edges.
  task automatic h_round(input bit l_falls_first);
    sig_h = 1; expect_out(1, 0, 0, "H arrives first");
    sig_l = 1; expect_out(1, 0, 1, "L arrives, done rises");
    if (l_falls_first) begin
      sig_l = 0; expect_out(1, 0, 1, "L falls first, done held");
      sig_h = 0; expect_out(0, 0, 0, "both low, done falls");
    end else begin
      sig_h = 0; expect_out(0, 0, 1, "H falls first, done held, L blocked");
      sig_l = 0; expect_out(0, 0, 0, "both low, done falls");
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sig_h = 0; sig_l = 0; start = 0;
    expect_out(0, 0, 0, "idle, start low");
    start = 1;
    expect_out(0, 0, 0, "idle, start high");
    h_round(0);
    h_round(1);
    // L wins: conversion finishes
    sig_l = 1; expect_out(0, 1, 0, "L arrives first, ab rises");
    sig_h = 1; expect_out(0, 1, 0, "H arrives late");
    sig_h = 0; expect_out(0, 1, 0, "H falls");
    sig_l = 0; expect_out(0, 1, 0, "both low, ab held");
    start = 0; expect_out(0, 0, 0, "start low clears ab");
    start = 1; expect_out(0, 0, 0, "next conversion");
    // L wins and falls first while H is still high: no stray Aa
    sig_l = 1; expect_out(0, 1, 0, "L arrives first");
    sig_h = 1; expect_out(0, 1, 0, "H arrives late");
    sig_l = 0; expect_out(0, 1, 0, "L falls first, H blocked");
    sig_h = 0; expect_out(0, 1, 0, "both low");
    start = 0; expect_out(0, 0, 0, "start low clears ab");
    start = 1; expect_out(0, 0, 0, "next conversion");
    // Random sequence of rounds against a reference
    for (int r = 0; r < 200; r++) begin
      int kind;
      kind = $urandom_range(0, 9);
      if (kind == 0) begin
        // L wins, then restart
        sig_l = 1; expect_out(0, 1, 0, "random: L first");
        sig_h = 1; expect_out(0, 1, 0, "random: H late");
        sig_l = 0; expect_out(0, 1, 0, "random: L falls, H blocked");
        sig_h = 0; expect_out(0, 1, 0, "random: finished, both low");
        start = 0; expect_out(0, 0, 0, "random: clear");
        start = 1; #1;
      end else if (kind == 1) begin
        // Tie: exactly one outcome
        sig_h = 1; sig_l = 1; #1;
        checks++;
        if (!((aa && done && !ab) || (!aa && !done && ab))) begin
          failures++;
          $display("FAIL tie: aa=%b ab=%b done=%b", aa, ab, done);
        end
        sig_h = 0; sig_l = 0; #1;
        checks++;
        if (done !== 1'b0 || aa !== 1'b0) begin
          failures++;
          $display("FAIL tie release: aa=%b done=%b", aa, done);
        end
        start = 0; #1; start = 1; #1;
      end else begin
        h_round(1'($urandom));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
