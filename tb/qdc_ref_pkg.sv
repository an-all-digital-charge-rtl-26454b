// qdc_ref_pkg: reference model used by the converter's end-to-end
// testbenches. It predicts the output code round by round, independently of
// the RTL: round i compares the two chain delays with the capacitor at
// V_HIGH * K^(2(i-1)), where K = C / (C + C_LOAD) is the charge sharing of one
// chain transition (two transitions, rising and falling, per round). The code
// is the number of rounds, the last being the one the reference chain wins.
// When the two delays are within 1.5 ps the outcome of that round may go
// either way (the simulator rounds each delay to 1 ps), so the model returns
// a low and a high bound.
package qdc_ref_pkg;
  // Chain delay, alpha-power law: 16 stages, Vth 0.3 V, alpha 1.3, 30 ps at 1 V.
  function automatic real ref_chain_ns(input real v);
    return 16.0 * 0.030 * (0.7 ** 1.3) * v / ((v - 0.3) ** 1.3);
  endfunction

  function automatic void expected_code(input real vh, input real vl, input real c_pf,
                                        input real cload_pf, output int lo, output int hi);
    real v, k, dh, dl;
    int n;
    v  = vh;
    k  = c_pf / (c_pf + cload_pf);
    n  = 0;
    lo = -1;
    hi = -1;
    dl = ref_chain_ns(vl);
    while (hi < 0) begin
      n++;
      dh = (v > 0.3) ? ref_chain_ns(v) : 1.0e9;
      if (dh > dl + 0.0015) begin
        hi = n;
        if (lo < 0) lo = n;
      end else begin
        if (dh >= dl - 0.0015 && lo < 0) lo = n;
        v = v * k * k;
      end
    end
  endfunction

  // Closed form (n rounds: V_HIGH * K^(2(n-1)) = V_LOW), for the trend check.
  function automatic real closed_form_code(input real vh, input real vl, input real c_pf,
                                           input real cload_pf);
    real k;
    k = c_pf / (c_pf + cload_pf);
    return $ln(vh / vl) / (2.0 * $ln(1.0 / k)) + 1.0;
  endfunction
endpackage
