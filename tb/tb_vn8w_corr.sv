// tb_vn8w_corr: decorrelation workload for VN_8W.
// A correlated raw stream is generated as a symmetric two-state Markov
// chain: each bit repeats the previous one with probability
// 0.5 + RHO/2. That gives P(1) = 0.5 and a lag-1 autocorrelation of RHO.
// RHO = 0.033 is the lag-1 factor of the correlated test data the design
// was characterised with; the Markov chain is this testbench's own
// stand-in for that data's generator.
// About 1.6 million raw bits are fed to VN_8W, giving close to 1,000,000
// output bits. The testbench checks four things:
//   - the raw stream's lag-1 factor is near RHO;
//   - the output's lag-1 and lag-2 factors are below RHO/5 in magnitude.
//     With this design's code assignment they come out near -0.002..-0.003
//     and +0.002, about ten times smaller than the raw factor. That is at
//     the edge of the 95 % band of an uncorrelated 1,000,000-bit stream
//     (+-0.002), which is also printed;
//   - the output's ones-fraction is 0.5 +- 0.003;
//   - the efficiency is within 0.01 of the zero-bias 62.21 %. Correlation
//     makes runs likelier, so the efficiency drops slightly.
// Output bits are taken in the documented read order: valid dout bits from
// bit 5 down, then valid dout_wait bits from bit 4 down.
module tb_vn8w_corr;
  localparam int  NRAW = 1_600_000;
  localparam real RHO  = 0.033;

  logic clk = 0, rst_n = 0, din = 0;
  logic [5:0] dout, dvalid;
  logic [4:0] dout_wait, dvalid_wait;
  logic dstb, vf;

  vn8w dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // lag statistics of a +-1 stream: sum x_t x_{t-k}, sum x_t
  longint raw_n = 0, raw_s = 0, raw_c1 = 0;
  longint out_n = 0, out_s = 0, out_c1 = 0, out_c2 = 0;
  int o1 = 0, o2 = 0, r1 = 0;   // previous output bits / raw bit as +-1

  task automatic push_out(input bit b);
    int x;
    x = b ? 1 : -1;
    if (out_n >= 1) out_c1 += x * o1;
    if (out_n >= 2) out_c2 += x * o2;
    out_s += longint'(x);
    out_n++;
    o2 = o1;
    o1 = x;
  endtask

  always @(posedge clk) begin
    #1;
    if (rst_n && dstb) begin
      for (int i = 5; i >= 0; i--) if (dvalid[i]) push_out(dout[i]);
      for (int i = 4; i >= 0; i--) if (dvalid_wait[i]) push_out(dout_wait[i]);
    end
  end

  function automatic real acf(longint c, longint s, longint n);
    real m;
    m = real'(s) / real'(n);
    return (real'(c) / real'(n) - m * m) / (1.0 - m * m);
  endfunction

  initial begin
    bit prev;
    int thr;
    real a1, a2, ar, bound, ones, exe;
    prev = 1'b0;
    thr  = int'((0.5 + RHO / 2.0) * 1000000.0);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < NRAW; i++) begin
      int x;
      @(negedge clk);
      din = (($urandom % 1000000) < thr) ? prev : ~prev;
      prev = din;
      x = din ? 1 : -1;
      if (raw_n >= 1) raw_c1 += x * r1;
      raw_s += longint'(x);
      raw_n++;
      r1 = x;
    end
    repeat (20) @(posedge clk);
    ar    = acf(raw_c1, raw_s, raw_n);
    a1    = acf(out_c1, out_s, out_n);
    a2    = acf(out_c2, out_s, out_n);
    bound = 1.96 / $sqrt(real'(out_n));
    ones  = 0.5 + 0.5 * real'(out_s) / real'(out_n);
    exe   = real'(out_n) / real'(raw_n);
    $display("raw lag-1 %0.4f; output bits %0d, lag-1 %0.5f lag-2 %0.5f (bound %0.5f), P(1) %0.4f, ExE %0.4f",
             ar, out_n, a1, a2, bound, ones, exe);
    check(ar > RHO - 0.004 && ar < RHO + 0.004, "raw stream has the intended lag-1 correlation");
    check(a1 > -RHO / 5.0 && a1 < RHO / 5.0, "output lag-1 factor reduced at least five times");
    check(a2 > -RHO / 5.0 && a2 < RHO / 5.0, "output lag-2 factor small");
    check(ones > 0.497 && ones < 0.503, "output balanced");
    check(exe > 0.6221 - 0.01 && exe < 0.6221 + 0.01, "extraction efficiency at zero bias");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
