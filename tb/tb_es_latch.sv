// tb_es_latch: statistical test of the entropy-source latch model.
// Four instances with different mismatch and compensation settings are
// cycled through equalization (with or without an HR phase) and
// evaluation. Checked: the equalization voltages differ by the mismatch;
// the fraction of ones matches Phi((1 - eta) * d / sigma), with sigma the
// enhanced noise after an HR phase and a third of it without; the HR
// phase brings a mismatched latch closer to 0.5 (noise enhancement); and
// the compensated latch beats an uncompensated one (eta = 0).
module tb_es_latch;
  logic s1 = 0, s2 = 0, s3 = 0;
  real vgl [4], vgr [4];
  int checks = 0, failures = 0;
  localparam real D [4]   = '{0.0, 1.0, -20.0, 1.0};
  localparam real ETA [4] = '{0.633, 0.633, 0.633, 0.0};
  localparam int  NCYC = 4000;

  for (genvar i = 0; i < 4; i++) begin : g_dut
    es_latch #(.MISMATCH_MV(D[i]), .ETA_COM(ETA[i])) dut (
      .s1, .s1b(~s1), .s2, .s2b(~s2), .s3, .s3b(~s3), .vgl(vgl[i]), .vgr(vgr[i]));
  end

  function automatic real phi(input real x);
    real z, t, y;
    z = (x < 0.0 ? -x : x) / 1.4142135623730951;
    t = 1.0 / (1.0 + 0.3275911 * z);
    y = 1.0 - (((((1.061405429 * t - 1.453152027) * t) + 1.421413741) * t
                - 0.284496736) * t + 0.254829592) * t * $exp(-z * z);
    return (x < 0.0) ? 0.5 * (1.0 - y) : 0.5 * (1.0 + y);
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  int ones [2][4];

  task automatic run(input bit hr);
    for (int c = 0; c < NCYC; c++) begin
      s1 = 1; s3 = 1; #4;
      if (c == 0) check(vgl[1] - vgr[1] > 0.99e-3 && vgl[1] - vgr[1] < 1.01e-3, "equalization offset");
      if (hr) begin s3 = 0; #2; end
      s1 = 0; s3 = 0; #1;
      s2 = 1; #2;
      for (int i = 0; i < 4; i++) ones[hr][i] += (vgl[i] > vgr[i]);
      s2 = 0; #1;
    end
  endtask

  initial begin
    real p, e;
    run(1'b1);
    run(1'b0);
    for (int hr = 0; hr < 2; hr++)
      for (int i = 0; i < 4; i++) begin
        p = real'(ones[hr][i]) / real'(NCYC);
        e = phi((1.0 - ETA[i]) * D[i] / (hr != 0 ? 2.26 : 2.26 / 3.0));
        $display("HR=%0d d=%5.1f mV eta=%0.3f: P(1) %0.4f expected %0.4f", hr, D[i], ETA[i], p, e);
        check(p > e - 0.035 && p < e + 0.035, "P(1) against Phi");
      end
    check(ones[1][1] < ones[0][1] - NCYC / 20, "HR phase moves P(1) toward 0.5");
    check(ones[1][1] < ones[1][3] - NCYC / 40, "compensation moves P(1) toward 0.5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
