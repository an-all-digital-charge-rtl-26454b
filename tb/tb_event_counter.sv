// tb_event_counter: counts random numbers of clock pulses and compares with
// an integer count, checks the clear, the update on the rising edge only and
// the wrap from all ones to zero (with a narrow instance), and follows the
// first rows of the counter's truth table.
module tb_event_counter;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned W = 20;
  localparam int unsigned WS = 4;  // narrow copy for the wrap test

  logic clk, rst_n;
  logic [W-1:0]  d_out;
  logic [WS-1:0] d_small;
  int checks = 0, failures = 0;

  event_counter dut (.clk(clk), .rst_n(rst_n), .d_out(d_out));
  event_counter #(.WIDTH(WS)) dut_small (.clk(clk), .rst_n(rst_n), .d_out(d_small));

  task automatic pulse();
    clk = 1; #2; clk = 0; #2;
  endtask

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: d_out=%0d d_small=%0d", what, d_out, d_small);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 0; rst_n = 1; #1; rst_n = 0; #2; rst_n = 1; #1;
    check(d_out == 0 && d_small == 0, "after clear");
    // Table rows 0..4
    for (int n = 1; n <= 4; n++) begin
      pulse();
      check(d_out == W'(n), "truth table row");
    end
    // Rising edge only
    clk = 1; #1; check(d_out == 5, "rising edge counted");
    clk = 0; #1; check(d_out == 5, "falling edge ignored");
    #2;
    // Wrap of the narrow instance: 5 counted so far, 2^WS = 16
    for (int n = 6; n <= 20; n++) pulse();
    check(d_small == WS'(20 % 16), "narrow counter wraps");
    check(d_out == 20, "wide counter at 20");
    // Random lengths
    for (int k = 0; k < 8; k++) begin
      int unsigned len;
      len = $urandom_range(1, 3000);
      rst_n = 0; #1; rst_n = 1; #1;
      check(d_out == 0, "clear");
      for (int unsigned i = 0; i < len; i++) pulse();
      check(d_out == W'(len), "random count");
      check(d_small == WS'(len), "random count, narrow");
    end
    // Carry into the upper bits: preload by counting 2^17 + 5 pulses
    rst_n = 0; #1; rst_n = 1; #1;
    for (int unsigned i = 0; i < (1 << 17) + 5; i++) pulse();
    check(d_out == W'((1 << 17) + 5), "carry into bit 17");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
