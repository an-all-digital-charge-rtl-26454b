// tb_event_generator: with V_SENSE above V_LOW Signal(H) must lead Signal(L)
// by the difference of the two chain delays; with V_SENSE below V_LOW it must
// trail; with equal supplies both arrive together. Falling edges too.
module tb_event_generator;
  timeunit 1ns;
  timeprecision 1ps;

  real v_sense, v_low;
  logic clk_up, sig_h, sig_l;
  int checks = 0, failures = 0;
  realtime t_h, t_l;

  event_generator dut (.clk_up(clk_up), .v_sense(v_sense), .v_low(v_low),
                       .sig_h(sig_h), .sig_l(sig_l));

  function automatic real chain_ns(input real v);
    return 16.0 * 0.030 * ((0.7) ** 1.3) * v / ((v - 0.3) ** 1.3);
  endfunction


  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t_h=%0.4f t_l=%0.4f)", what, t_h, t_l);
    end
  endtask

  task automatic edge_pair(input real vs, input real vl);
    realtime t0;
    real lead, exp_lead;
    v_sense = vs; v_low = vl;
    #5;
    t0 = $realtime;
    clk_up = ~clk_up;
    fork
      begin @(sig_h); t_h = $realtime; end
      begin @(sig_l); t_l = $realtime; end
      #40;
    join
    check(sig_h == clk_up && sig_l == clk_up, "both events arrived");
    lead = t_l - t_h;
    exp_lead = chain_ns(vl) - chain_ns(vs);
    check(lead > exp_lead - 0.003 && lead < exp_lead + 0.003,
          $sformatf("lead %0.4f ns, expected %0.4f at Vs=%0.3f Vl=%0.3f",
                    lead, exp_lead, vs, vl));
    check(t_h > t0 && t_l > t0, "events after the trigger");
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk_up = 0; v_sense = 1.0; v_low = 0.45;
    #10;
    edge_pair(1.0, 0.45);   check(t_h < t_l, "H leads at 1.0 V");
    edge_pair(1.0, 0.45);
    edge_pair(0.6, 0.45);   check(t_h < t_l, "H leads at 0.6 V");
    edge_pair(0.46, 0.45);  check(t_h < t_l, "H leads just above V_LOW");
    edge_pair(0.45, 0.45);  check(t_h == t_l, "equal supplies arrive together");
    edge_pair(0.44, 0.45);  check(t_h > t_l, "L leads below V_LOW");
    edge_pair(0.40, 0.45);  check(t_h > t_l, "L leads well below V_LOW");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
