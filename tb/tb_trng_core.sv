// tb_trng_core: the four-source core at its default settings.
// CLK1/CLK2 are stepped through LR, HR, OFF and evaluation (and, in a
// second run, through LR, OFF and evaluation with no HR phase). Checked:
// xor_out is the XOR of the four source bits after every evaluation; each
// source's fraction of ones, and the XOR output's, match the values
// predicted from the mismatch, compensation and noise figures
// (p_i = Phi((1 - eta) d_i / sigma), P(xor) = 1/2 - 1/2 prod(1 - 2 p_i));
// and without the HR phase the XOR output is further from 0.5.
module tb_trng_core;
  logic clk1 = 0, clk2 = 0;
  logic [3:0] es_out;
  logic xor_out;
  int checks = 0, failures = 0;
  localparam real D [4] = '{3.0, -2.0, 4.5, -1.0};
  localparam int  NCYC = 5000;

  trng_core dut (.clk1, .clk2, .es_out, .xor_out);

  // Standard normal CDF (Abramowitz & Stegun 7.1.26 erf, error < 1.5e-7).
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

  int ones_es [2][4];
  int ones_x [2];

  task automatic run(input bit hr);
    for (int c = 0; c < NCYC; c++) begin
      clk1 = 1; clk2 = 1; #4;
      if (hr) begin clk2 = 0; #2; end
      clk1 = 0; clk2 = 0; #1;
      clk2 = 1; #3;
      check(xor_out == ^es_out, "xor_out is the XOR of the sources");
      for (int i = 0; i < 4; i++) ones_es[hr][i] += es_out[i];
      ones_x[hr] += xor_out;
    end
  endtask

  initial begin
    real p, e, prod;
    run(1'b1);
    run(1'b0);
    for (int hr = 0; hr < 2; hr++) begin
      prod = 1.0;
      for (int i = 0; i < 4; i++) begin
        e = phi(0.367 * D[i] / (hr != 0 ? 2.26 : 2.26 / 3.0));
        prod *= (1.0 - 2.0 * e);
        p = real'(ones_es[hr][i]) / real'(NCYC);
        check(p > e - 0.035 && p < e + 0.035, $sformatf("ES%0d P(1) %0.3f exp %0.3f", i, p, e));
      end
      e = 0.5 - 0.5 * prod;
      p = real'(ones_x[hr]) / real'(NCYC);
      $display("HR=%0d XOR-OUT P(1) %0.4f expected %0.4f", hr, p, e);
      check(p > e - 0.035 && p < e + 0.035, "XOR-OUT P(1)");
    end
    check(ones_x[0] < ones_x[1] - NCYC / 40, "HR phase brings XOR-OUT toward 0.5");
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
