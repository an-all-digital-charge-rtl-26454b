// tb_charge_discharge: precharge sets the capacitor to V_HIGH; with the
// Discharge switch open no transition drains it and V_SENSE is 0; with it
// closed every transition of the load divides the voltage by
// (C + C_LOAD) / C, checked against the closed form V_HIGH * K^n.
module tb_charge_discharge;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real CL = 0.0624;

  logic precharge, discharge, load_edge;
  real v_high, c_pf, v_cap, v_sense;
  int checks = 0, failures = 0;

  charge_discharge dut (.precharge(precharge), .discharge(discharge),
                        .v_high(v_high), .c_sense_pf(c_pf), .load_edge(load_edge),
                        .v_cap(v_cap), .v_sense(v_sense));

  function automatic bit close(input real a, input real b);
    return (a - b < 1e-9) && (b - a < 1e-9);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: v_cap=%0.6f v_sense=%0.6f", what, v_cap, v_sense);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    precharge = 0; discharge = 0; load_edge = 0; v_high = 0.8; c_pf = 50.0;
    #1;
    precharge = 1; #1;
    check(close(v_cap, 0.8), "charged to V_HIGH");
    check(close(v_sense, 0.0), "discharge switch open: no supply");
    v_high = 0.9; #1;
    check(close(v_cap, 0.9), "follows V_HIGH while precharging");
    precharge = 0; #1;
    repeat (10) begin load_edge = ~load_edge; #1; end
    check(close(v_cap, 0.9), "no drain with the discharge switch open");
    discharge = 1; #1;
    check(close(v_sense, 0.9), "V_SENSE connected");
    for (int n = 1; n <= 500; n++) begin
      load_edge = ~load_edge; #1;
      if (n % 50 == 0)
        check(close(v_cap, 0.9 * ((50.0 / (50.0 + CL)) ** real'(n))),
              $sformatf("after %0d transitions", n));
    end
    check(close(v_sense, v_cap), "V_SENSE tracks the capacitor");
    // Larger capacitor discharges more slowly
    precharge = 1; discharge = 0; c_pf = 500.0; #1;
    precharge = 0; discharge = 1; #1;
    repeat (500) begin load_edge = ~load_edge; #1; end
    check(close(v_cap, 0.9 * ((500.0 / (500.0 + CL)) ** 500.0)), "500 pF after 500");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
