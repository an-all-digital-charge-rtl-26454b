// tb_signal_generator: walks the three stages of the signal generator.
// Stage 1 (start low): clk stays low whatever done and ab do.
// Stage 2 (start high, ab low): clk is the inverse of done.
// Stage 3 (ab high): clk is disabled, and stays disabled while ab is high.
// Lowering start and raising it again starts a new conversion.
module tb_signal_generator;
  timeunit 1ns;
  timeprecision 1ps;

  logic start, ab, done, clk;
  int checks = 0, failures = 0;

  signal_generator dut (.start(start), .ab(ab), .done(done), .clk(clk));

  task automatic expect_clk(input logic e, input string what);
    #1;
    checks++;
    if (clk !== e) begin
      failures++;
      $display("FAIL %s: start=%b ab=%b done=%b clk=%b expected %b",
               what, start, ab, done, clk, e);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; ab = 0; done = 0;
    // Stage 1
    expect_clk(0, "stage 1");
    done = 1;  expect_clk(0, "stage 1, done high");
    done = 0;  expect_clk(0, "stage 1, done low");
    // Stage 2
    start = 1; expect_clk(1, "start rises");
    for (int i = 0; i < 10; i++) begin
      done = 1; expect_clk(0, "stage 2, done high");
      done = 0; expect_clk(1, "stage 2, done low");
    end
    // Stage 3: ab stops the clock while it is high
    ab = 1;    expect_clk(0, "stage 3, ab rises");
    done = 1;  expect_clk(0, "stage 3, done high");
    done = 0;  expect_clk(0, "stage 3, done low");
    // New conversion: start low, ab cleared, start high again
    start = 0; expect_clk(0, "start lowered");
    ab = 0;    expect_clk(0, "ab cleared with start low");
    start = 1; expect_clk(1, "second conversion starts");
    done = 1;  expect_clk(0, "second conversion, done high");
    done = 0;  expect_clk(1, "second conversion, done low");
    // Finish while Clk is high, from stage 2
    ab = 1;    expect_clk(0, "finish while clk high");
    // Re-arm gate: with start still high, ab falling re-enables the clock
    ab = 0;    expect_clk(1, "ab falls with start high");
    start = 0; expect_clk(0, "start lowered again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
