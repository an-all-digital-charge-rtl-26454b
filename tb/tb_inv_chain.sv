// tb_inv_chain: measures the propagation delay of the 16-stage chain at
// several supply voltages and compares it with the alpha-power-law formula
// evaluated here (Vth = 0.3 V, alpha = 1.3, 30 ps per inverter at 1 V);
// checks that delay falls as the supply rises, that an odd chain inverts,
// and that a chain supplied below threshold does not switch.
module tb_inv_chain;
  timeunit 1ns;
  timeprecision 1ps;

  real vdd;
  logic in, out, out_odd;
  int checks = 0, failures = 0;

  inv_chain dut (.vdd(vdd), .in(in), .out(out));
  inv_chain #(.STAGES(15)) dut_odd (.vdd(vdd), .in(in), .out(out_odd));

  function automatic real expected_ns(input real v, input int stages);
    real k;
    k = 0.030 * ((0.7) ** 1.3);
    return real'(stages) * k * v / ((v - 0.3) ** 1.3);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Toggle the input and time the output edge.
  task automatic measure(input real v, output real delay_ns);
    realtime t0;
    vdd = v;
    #5;
    t0 = $realtime;
    in = ~in;
    @(out);
    delay_ns = $realtime - t0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real d, prev;
    real volts[6] = '{1.0, 0.9, 0.8, 0.6, 0.5, 0.45};
    in = 0; vdd = 1.0;
    #10;
    check(out == 1'b0 && out_odd == 1'b1, "initial levels");
    prev = 0.0;
    foreach (volts[i]) begin
      measure(volts[i], d);
      check(d > expected_ns(volts[i], 16) - 0.002 && d < expected_ns(volts[i], 16) + 0.002,
            $sformatf("delay at %0.2f V: %0.4f ns, expected %0.4f", volts[i], d,
                      expected_ns(volts[i], 16)));
      check(d > prev, "delay grows as the supply falls");
      check(out == in, "even chain does not invert");
      #20;
      check(out_odd == ~in, "odd chain inverts");
      prev = d;
    end
    // Below threshold: no switching
    vdd = 0.25;
    #5;
    in = ~in;
    #100;
    check(out != in, "no switching below threshold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
