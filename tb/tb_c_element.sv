// tb_c_element: exhaustive check of the C-element against its truth table,
// walking every input transition from both held output values.
module tb_c_element;
  timeunit 1ns;
  timeprecision 1ps;

  logic x1, x2, y;
  logic exp_y;
  int checks = 0, failures = 0;

  c_element dut (.x1(x1), .x2(x2), .y(y));

  task automatic apply(input logic a, input logic b);
    x1 = a; x2 = b;
    #1;
    if (a == b) exp_y = a;  // otherwise the previous value is held
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL x1=%b x2=%b y=%b expected %b", a, b, y, exp_y);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_y = 1'b0;
    apply(0, 0);
    apply(0, 1); apply(0, 0);
    apply(1, 0); apply(0, 0);
    apply(1, 0); apply(1, 1);
    apply(0, 1); apply(1, 1);
    apply(1, 0); apply(0, 0);
    apply(0, 1); apply(1, 1);
    apply(1, 0); apply(0, 0);
    for (int i = 0; i < 40; i++) apply(1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
