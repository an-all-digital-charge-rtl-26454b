// tb_qdc_top: end-to-end test of the converter at its default sizes
// (16-stage chains, 20-bit code).
//
// Each conversion precharges C_SENSE, clears the code, closes the Discharge
// switch and raises Start, then waits for the finish flag. It checks:
//  * the code against the round-by-round reference model and against the
//    closed-form count;
//  * the code against the number of Clk rising edges seen on the pin;
//  * that every round but the last was won by Signal(H) (Aa), the last by
//    Signal(L) (Ab), with one Done handshake per Signal(H) win;
//  * that Clk stays stopped after the finish and the code holds;
//  * that a second conversion after lowering Start works (restart);
//  * linearity in C_SENSE at fixed V_HIGH and the logarithmic law in V_HIGH.
// Each mechanism (H win, L win / finish, Done handshake, clock stop, restart,
// counter carry beyond 8 bits) is counted and must occur at least once.
module tb_qdc_top;
  timeunit 1ns;
  timeprecision 1ps;
  import qdc_ref_pkg::*;

  localparam real CLOAD_PF = 0.0078 * 8.0;  // 8 of 16 inverters rise per edge

  logic rst_n, precharge, discharge, start;
  real  v_high, v_low, c_sense_pf, v_sense;
  logic [19:0] d_out;
  logic finished, aa, clk, sig_h, sig_l, done;

  int checks = 0, failures = 0;
  int clk_rises, aa_rises, done_rises, ab_rises;
  int n_h_wins = 0, n_finish = 0, n_handshakes = 0, n_clock_stop = 0, n_restart = 0,
      n_carry = 0;

  qdc_top dut (
    .rst_n(rst_n), .precharge(precharge), .discharge(discharge), .start(start),
    .v_high(v_high), .v_low(v_low), .c_sense_pf(c_sense_pf),
    .d_out(d_out), .finished(finished), .aa(aa), .clk(clk), .sig_h(sig_h), .sig_l(sig_l),
    .done(done), .v_sense(v_sense)
  );

  always @(posedge clk)           clk_rises++;
  always @(posedge aa)            aa_rises++;
  always @(posedge done)          done_rises++;
  always @(posedge finished)      ab_rises++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic convert(input real vh, input real vl, input real c, output int code);
    int lo, hi;
    real cf;
    start = 0; discharge = 0; precharge = 1;
    v_high = vh; v_low = vl; c_sense_pf = c;
    rst_n = 0;
    #5;
    rst_n = 1; precharge = 0;
    #5;
    discharge = 1;
    #5;
    clk_rises = 0; aa_rises = 0; done_rises = 0; ab_rises = 0;
    start = 1;
    wait (finished);
    #50;
    code = int'(d_out);
    expected_code(vh, vl, c, CLOAD_PF, lo, hi);
    cf = closed_form_code(vh, vl, c, CLOAD_PF);
    check(code >= lo && code <= hi,
          $sformatf("code %0d for %0.0f pF at %0.3f V (ref %0d..%0d)", code, c, vh, lo, hi));
    if (vh > vl) check(real'(code) > cf - 1.5 && real'(code) < cf + 1.5,
          $sformatf("code %0d vs closed form %0.2f", code, cf));
    check(code == clk_rises, $sformatf("code %0d vs %0d Clk rises", code, clk_rises));
    check(aa_rises == code - 1, $sformatf("%0d H wins for code %0d", aa_rises, code));
    check(done_rises == aa_rises, $sformatf("%0d Done for %0d H wins", done_rises, aa_rises));
    check(ab_rises == 1, "exactly one finish");
    n_h_wins     += aa_rises;
    n_handshakes += done_rises;
    n_finish     += ab_rises;
    if (code > 255) n_carry++;
    // Clock stays stopped, code holds
    #500;
    check(clk == 0 && clk_rises == code && int'(d_out) == code, "clock stopped after finish");
    if (clk == 0 && clk_rises == code) n_clock_stop++;
    $display("conversion: C=%0.0f pF V_HIGH=%0.3f V_LOW=%0.3f -> code %0d (V_SENSE now %0.4f)",
             c, vh, vl, code, v_sense);
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c50, c100, c500, c_v6, c_v8, c_v10, c_again;
    rst_n = 1; precharge = 0; discharge = 0; start = 0;
    v_high = 0.8; v_low = 0.45; c_sense_pf = 50.0;
    #10;
    check(clk == 0 && finished == 0, "idle before start");
    convert(0.8, 0.45, 50.0, c50);
    // Restart with the same inputs: identical code
    convert(0.8, 0.45, 50.0, c_again);
    check(c_again == c50, "second conversion repeats the code");
    if (c_again == c50) n_restart++;
    convert(0.8, 0.45, 100.0, c100);
    convert(0.8, 0.45, 500.0, c500);
    // Linear in C_SENSE (Eq. n proportional to C for C >> Cp)
    check(real'(c500 - 1) / real'(c50 - 1) > 9.9 && real'(c500 - 1) / real'(c50 - 1) < 10.1,
          "code linear in capacitance (500 pF vs 50 pF)");
    check(real'(c100 - 1) / real'(c50 - 1) > 1.98 && real'(c100 - 1) / real'(c50 - 1) < 2.02,
          "code linear in capacitance (100 pF vs 50 pF)");
    // Logarithmic in V_HIGH at fixed C_SENSE
    convert(0.6, 0.45, 50.0, c_v6);
    convert(1.0, 0.45, 50.0, c_v10);
    c_v8 = c50;
    check(c_v6 < c_v8 && c_v8 < c_v10, "code grows with V_HIGH");
    check((real'(c_v10 - 1) / real'(c_v6 - 1) > 0.97 * $ln(1.0 / 0.45) / $ln(0.6 / 0.45)) &&
          (real'(c_v10 - 1) / real'(c_v6 - 1) < 1.03 * $ln(1.0 / 0.45) / $ln(0.6 / 0.45)),
          "code logarithmic in V_HIGH");
    // V_HIGH below V_LOW: the very first comparison finishes
    begin
      int c_low;
      convert(0.42, 0.45, 50.0, c_low);
      check(c_low == 1, "V_HIGH below V_LOW gives code 1");
    end
    // Every mechanism happened
    check(n_h_wins > 0,     "mechanism: Signal(H) wins");
    check(n_finish > 0,     "mechanism: Signal(L) wins / finish");
    check(n_handshakes > 0, "mechanism: Done handshake");
    check(n_clock_stop > 0, "mechanism: clock stop");
    check(n_restart > 0,    "mechanism: restart after Start low");
    check(n_carry > 0,      "mechanism: counter carry beyond 8 bits");
    $display("mechanisms: H wins %0d, finishes %0d, handshakes %0d, clock stops %0d, restarts %0d, carries %0d",
             n_h_wins, n_finish, n_handshakes, n_clock_stop, n_restart, n_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
