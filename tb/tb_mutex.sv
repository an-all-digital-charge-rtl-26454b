// tb_mutex: checks that the first request is granted and held, that a later
// request waits and is granted once the first is withdrawn, that the grants
// are never both high, and that simultaneous requests get exactly one grant.
module tb_mutex;
  timeunit 1ns;
  timeprecision 1ps;

  logic ra, rb, aa, ab;
  int checks = 0, failures = 0;

  mutex dut (.ra(ra), .rb(rb), .aa(aa), .ab(ab));

  task automatic expect_grants(input logic ea, input logic eb, input string what);
    #1;
    checks++;
    if (aa !== ea || ab !== eb) begin
      failures++;
      $display("FAIL %s: aa=%b ab=%b expected %b %b", what, aa, ab, ea, eb);
    end
  endtask

  always @(aa or ab) if (aa && ab) begin
    failures++;
    $display("FAIL both grants high at %t", $time);
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ra = 0; rb = 0;
    expect_grants(0, 0, "idle");
    ra = 1;           expect_grants(1, 0, "ra alone");
    rb = 1;           expect_grants(1, 0, "rb waits behind ra");
    ra = 0;           expect_grants(0, 1, "rb granted after ra withdraws");
    ra = 1;           expect_grants(0, 1, "ra waits behind rb");
    rb = 0;           expect_grants(1, 0, "ra granted after rb withdraws");
    ra = 0;           expect_grants(0, 0, "idle again");
    rb = 1;           expect_grants(0, 1, "rb alone");
    rb = 0;           expect_grants(0, 0, "idle");
    // Simultaneous requests: exactly one grant.
    for (int i = 0; i < 20; i++) begin
      ra = 1; rb = 1;
      #1;
      checks++;
      if ((aa ^ ab) !== 1'b1) begin
        failures++;
        $display("FAIL tie %0d: aa=%b ab=%b", i, aa, ab);
      end
      ra = 0; rb = 0;
      expect_grants(0, 0, "release after tie");
    end
    // Random request sequences against a reference arbiter.
    begin
      logic owner_a, owner_b;
      owner_a = 0; owner_b = 0;
      for (int i = 0; i < 200; i++) begin
        logic na, nb;
        na = 1'($urandom); nb = 1'($urandom);
        if (na != ra && nb != rb && na && nb) nb = rb;  // avoid a tie here
        ra = na; rb = nb;
        // reference: a grant holds while its request is high
        if (!ra) owner_a = 0;
        if (!rb) owner_b = 0;
        if (!owner_a && !owner_b) begin
          if (ra && !rb) owner_a = 1;
          else if (rb && !ra) owner_b = 1;
          else if (ra && rb) owner_a = aa;  // both already high: keep whoever holds
        end
        if (!owner_a && !owner_b && ra && rb) owner_b = ab;
        expect_grants(owner_a, owner_b, "random");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
