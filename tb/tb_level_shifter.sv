// tb_level_shifter: the logic value of Clk must pass unchanged after the
// 50 ps cell delay, the complementary node must be its inverse, and the level
// of a logic 1 at the output must be V_SENSE rather than V_LOW.
module tb_level_shifter;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk, out1, out2;
  real v_sense, lvl;
  int checks = 0, failures = 0;

  level_shifter dut (.clk(clk), .v_sense(v_sense), .out1(out1), .out2(out2),
                     .out1_level_v(lvl));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: clk=%b out1=%b out2=%b level=%0.3f", what, clk, out1, out2, lvl);
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
    clk = 0; v_sense = 0.8;
    #1;
    check(out1 == 0 && out2 == 1 && lvl == 0.0, "low");
    for (int i = 0; i < 20; i++) begin
      v_sense = 0.5 + 0.025 * real'(i);
      clk = ~clk;
      #0.049;
      check(out1 != clk, "not yet through after 49 ps");
      #0.002;
      check(out1 == clk, "through after 51 ps");
      check(out2 == ~out1, "complement");
      check(out1 ? (lvl == v_sense) : (lvl == 0.0), "output level");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
