// tb_qdc_sweep: the characterisation grid of the converter. With the
// reference at 0.45 V it converts every combination of V_HIGH from 0.5 V to
// 1.0 V (0.1 V steps) and C_SENSE of 25, 50, 100, 200, 300, 400 and 500 pF,
// checks each code against the round-by-round reference model, and checks
// the two laws the converter rests on: for a fixed V_HIGH the code is linear
// in C_SENSE (ratio of codes equals ratio of capacitances), and for a fixed
// C_SENSE it grows with V_HIGH as ln(V_HIGH / V_LOW). It also measures the
// response time (Start rising to Ab rising) and checks that it grows with both
// V_HIGH and C_SENSE, and converts the 0.55 V / 50 pF point used to show the
// comparator's operation. The code and time tables are printed.
module tb_qdc_sweep;
  timeunit 1ns;
  timeprecision 1ps;
  import qdc_ref_pkg::*;

  localparam real CLOAD_PF = 0.0078 * 8.0;
  localparam int NV = 6;
  localparam int NC = 7;

  logic rst_n, precharge, discharge, start;
  real  v_high, v_low, c_sense_pf, v_sense;
  logic [19:0] d_out;
  logic finished, aa, clk, sig_h, sig_l, done;
  int checks = 0, failures = 0;
  int codes[NV][NC];
  realtime times[NV][NC];

  real vhs[NV] = '{0.5, 0.6, 0.7, 0.8, 0.9, 1.0};
  real cs[NC]  = '{25.0, 50.0, 100.0, 200.0, 300.0, 400.0, 500.0};

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

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1; precharge = 0; discharge = 0; start = 0;
    v_low = 0.45; v_high = 0.5; c_sense_pf = 25.0;
    #10;
    foreach (vhs[i]) foreach (cs[j]) begin
      int lo, hi;
      start = 0; discharge = 0; precharge = 1;
      v_high = vhs[i]; c_sense_pf = cs[j];
      rst_n = 0; #5; rst_n = 1; precharge = 0; #5; discharge = 1; #5;
      begin
        realtime t0;
        t0 = $realtime;
        start = 1;
        wait (finished);
        times[i][j] = $realtime - t0;
      end
      #20;
      codes[i][j] = int'(d_out);
      expected_code(vhs[i], 0.45, cs[j], CLOAD_PF, lo, hi);
      check(codes[i][j] >= lo && codes[i][j] <= hi,
            $sformatf("V_HIGH %0.1f C %0.0f pF: code %0d, reference %0d..%0d",
                      vhs[i], cs[j], codes[i][j], lo, hi));
    end
    // Linearity in C (rounds after the first scale with C)
    // (codes are integers: the 25 pF code carries up to one count of
    // quantisation, which the ratio e multiplies)
    foreach (vhs[i]) for (int j = 1; j < NC; j++) begin
      real got, want, e;
      e    = cs[j] / cs[0];
      got  = real'(codes[i][j] - 1);
      want = e * real'(codes[i][0] - 1);
      check(got > want - 1.5 * e - 2.0 && got < want + 1.5 * e + 2.0,
            $sformatf("linearity at V_HIGH %0.1f, %0.0f pF: %0.0f rounds, expected %0.1f",
                      vhs[i], cs[j], got, want));
    end
    // Logarithmic law in V_HIGH
    foreach (cs[j]) for (int i = 0; i < NV - 1; i++) begin
      real r, e;
      r = real'(codes[NV-1][j] - 1) / real'(codes[i][j] - 1);
      e = $ln(vhs[NV-1] / 0.45) / $ln(vhs[i] / 0.45);
      check(r > e * 0.95 && r < e * 1.05,
            $sformatf("log law at C %0.0f pF: ratio %0.3f, expected %0.3f", cs[j], r, e));
    end
    // Response time grows with V_HIGH and with C_SENSE
    foreach (vhs[i]) for (int j = 1; j < NC; j++)
      check(times[i][j] > times[i][j-1],
            $sformatf("response time grows with C at V_HIGH %0.1f", vhs[i]));
    foreach (cs[j]) for (int i = 1; i < NV; i++)
      check(times[i][j] > times[i-1][j],
            $sformatf("response time grows with V_HIGH at %0.0f pF", cs[j]));
    // Comparator demonstration point: V_HIGH 0.55 V, V_LOW 0.45 V, 50 pF
    begin
      int lo, hi;
      start = 0; discharge = 0; precharge = 1;
      v_high = 0.55; c_sense_pf = 50.0;
      rst_n = 0; #5; rst_n = 1; precharge = 0; #5; discharge = 1; #5;
      start = 1;
      wait (finished);
      #20;
      expected_code(0.55, 0.45, 50.0, CLOAD_PF, lo, hi);
      check(int'(d_out) >= lo && int'(d_out) <= hi,
            $sformatf("0.55 V, 50 pF: code %0d, reference %0d..%0d", d_out, lo, hi));
      $display("0.55 V, 50 pF: code %0d", d_out);
    end
    $display("response time at 50 pF (ns): %0.0f %0.0f %0.0f %0.0f %0.0f %0.0f",
             times[0][1], times[1][1], times[2][1], times[3][1], times[4][1], times[5][1]);
    $display("code table (rows V_HIGH 0.5..1.0 V, columns 25, 50, 100, 200, 300, 400, 500 pF):");
    foreach (vhs[i])
      $display("  %0.1f V: %6d %6d %6d %6d %6d %6d %6d", vhs[i], codes[i][0], codes[i][1],
               codes[i][2], codes[i][3], codes[i][4], codes[i][5], codes[i][6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
