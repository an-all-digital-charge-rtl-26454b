// tb_qdc_chip: the converter run with the supplies of the test chip
// measurements: V_HIGH = 2.5 V, V_LOW = 1.5 V and a 100 nF off-chip capacitor.
// With the model's load capacitance (that of a 90 nm inverter chain) this
// needs about 409,000 rounds, which still fits the 20-bit code. The test
// checks the code against the reference model, that the capacitor ends just
// below V_LOW, and reports the conversion time. A second run at 50 nF must
// give about half the rounds and take about half the time, the trend the
// chip measurements show.
module tb_qdc_chip;
  timeunit 1ns;
  timeprecision 1ps;
  import qdc_ref_pkg::*;

  localparam real CLOAD_PF = 0.0078 * 8.0;

  logic rst_n, precharge, discharge, start;
  real  v_high, v_low, c_sense_pf, v_sense;
  logic [19:0] d_out;
  logic finished, aa, clk, sig_h, sig_l, done;
  int checks = 0, failures = 0;

  qdc_top dut (
    .rst_n(rst_n), .precharge(precharge), .discharge(discharge), .start(start),
    .v_high(v_high), .v_low(v_low), .c_sense_pf(c_sense_pf),
    .d_out(d_out), .finished(finished), .aa(aa), .clk(clk), .sig_h(sig_h),
    .sig_l(sig_l), .done(done), .v_sense(v_sense)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic convert(input real c, output int code, output realtime t_conv);
    int lo, hi;
    realtime t0;
    start = 0; discharge = 0; precharge = 1;
    v_high = 2.5; v_low = 1.5; c_sense_pf = c;
    rst_n = 0; #5; rst_n = 1; precharge = 0; #5; discharge = 1; #5;
    t0 = $realtime;
    start = 1;
    wait (finished);
    t_conv = $realtime - t0;
    #20;
    code = int'(d_out);
    expected_code(2.5, 1.5, c, CLOAD_PF, lo, hi);
    check(code >= lo && code <= hi,
          $sformatf("%0.0f pF: code %0d, reference %0d..%0d", c, code, lo, hi));
    check(v_sense < 1.5 && v_sense > 1.49, $sformatf("final V_SENSE %0.4f V", v_sense));
    $display("%0.0f nF at 2.5 V against 1.5 V: code %0d, conversion time %0.1f us",
             c / 1000.0, code, t_conv / 1000.0);
  endtask

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int code100, code50;
    realtime t100, t50;
    rst_n = 1; precharge = 0; discharge = 0; start = 0;
    v_high = 2.5; v_low = 1.5; c_sense_pf = 1.0e5;
    #10;
    convert(1.0e5, code100, t100);
    convert(5.0e4, code50, t50);
    check(code100 > 300000 && code100 < (1 << 20), "100 nF code fits 20 bits");
    check(real'(code100) / real'(code50) > 1.99 && real'(code100) / real'(code50) < 2.01,
          "half the capacitance, half the rounds");
    check(t100 / t50 > 1.9 && t100 / t50 < 2.1, "half the capacitance, about half the time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
