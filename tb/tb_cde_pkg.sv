// tb_cde_pkg: self-checking testbench of the tap-code derivation in cde_pkg.
//
// cd_tap_code finds the level indices of a tap from its phase alone,
// comparing the phase modulo 2*pi against fixed angles. Here the same taps
// are computed the direct way, with $cos and $sin of the phase and value
// thresholds at 0 and +-0.5, for the default link and for a spread of other
// dispersion constants and tap offsets. The link constant CD_K is also
// checked against its value worked out by hand (80.07).
module tb_cde_pkg;
  import cde_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic int idx(real v);
    if (v >= 0.5)       return 3;
    else if (v >= 0.0)  return 2;
    else if (v > -0.5)  return 1;
    else                return 0;
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real kd, ph, kds [5];
    tap_code_t c;
    int hre [4], him [4];
    check(CD_K > 80.0 && CD_K < 80.15, $sformatf("CD_K = %f", CD_K));
    kds = '{CD_K, 17.3, 41.9, 123.45, 300.7};
    foreach (hre[i]) begin
      hre[i] = 0;
      him[i] = 0;
    end
    foreach (kds[j]) begin
      kd = kds[j];
      for (int k = -150; k <= 150; k++) begin
        ph = 3.14159265358979 * (0.25 - real'(k * k) / kd);
        c  = cd_tap_code(k, kd);
        // skip phases within 1e-9 of a threshold, where rounding decides
        if (rabs($cos(ph)) > 1e-9 && rabs(rabs($cos(ph)) - 0.5) > 1e-9)
          check(int'(c.re) == idx($cos(ph)),
                $sformatf("K=%f k=%0d re: got %0d exp %0d", kd, k, c.re, idx($cos(ph))));
        if (rabs($sin(ph)) > 1e-9 && rabs(rabs($sin(ph)) - 0.5) > 1e-9)
          check(int'(c.im) == idx($sin(ph)),
                $sformatf("K=%f k=%0d im: got %0d exp %0d", kd, k, c.im, idx($sin(ph))));
        if (j == 0 && k >= -41 && k <= 41) begin
          hre[c.re]++;
          him[c.im]++;
        end
      end
    end
    // centre tap: phase pi/4, cos = sin = 0.707 -> level +3 on both parts
    c = cd_tap_code(0, CD_K);
    check(c.re == 2'd3 && c.im == 2'd3, "centre tap is +3+3j");
    foreach (hre[i]) check(hre[i] > 0 && him[i] > 0, $sformatf("level %0d used", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
