// tb_trng_top: end-to-end run of the complete generator at its default
// (full) size: four latch entropy sources, the XOR combiner and the VN_8W
// post-processor clocked by CLK1.
// After reset the CLK1/CLK2 sequence is applied for NCYC cycles with the HR
// phase and NCYC cycles without it. For each run the testbench measures the
// raw XOR-OUT probability, the extraction efficiency (post-processed bits
// per raw bit, direct and waiting outputs together) and the fraction of ones
// in the post-processed stream. The efficiency is compared with the value
// the VN_8W bit-yield table predicts at the measured raw probability, and
// the output must be close to unbiased. Every mechanism of the design is
// counted (frame sizes 6/3/2/1/0 bits, waiting pairs giving 5, 4 and 0
// bits, VF set, both core modes); the test fails if any count is zero.
module tb_trng_top;
  localparam int NCYC = 40000;

  logic clk1 = 0, clk2 = 0, rst_n = 0;
  logic [3:0] es_out;
  logic xor_out;
  logic [5:0] vn_dout, vn_dvalid;
  logic [4:0] vn_dout_wait, vn_dvalid_wait;
  logic vn_dstb, vn_vf;

  trng_top dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic real binom(int n, int k);
    real r = 1.0;
    for (int i = 0; i < k; i++) r = r * real'(n - i) / real'(i + 1);
    return r;
  endfunction

  // expected output bits per input bit of VN_8W for raw P(1) = p
  function automatic real exp_exe(real p);
    real b [9] = '{0.0, 3.0, 2.0 + 16.0/7.0, 3.0 + 16.0/7.0, 394.0/70.0,
                   3.0 + 16.0/7.0, 2.0 + 16.0/7.0, 3.0, 0.0};
    real e = 0.0;
    for (int k = 0; k <= 8; k++) e += binom(8, k) * (p ** k) * ((1.0 - p) ** (8 - k)) * b[k];
    return e / 8.0;
  endfunction

  // mechanism counters
  int n_frames = 0, n_f6 = 0, n_f3 = 0, n_f2 = 0, n_f1 = 0, n_f0 = 0;
  int n_pair5 = 0, n_pair4 = 0, n_pair0 = 0, n_vf_set = 0;
  int n_hr = 0, n_lr_only = 0;
  // stream statistics
  longint raw_bits = 0, raw_ones = 0, out_bits = 0, out_ones = 0;
  bit vf_prev = 0;

  always @(posedge clk1) if (rst_n) begin
    raw_bits++;
    raw_ones += xor_out;
  end

  always @(posedge clk1) begin
    #1;
    if (rst_n && vn_dstb) begin
      int nd;
      n_frames++;
      nd = $countones(vn_dvalid);
      case (nd)
        6: n_f6++;
        3: n_f3++;
        2: n_f2++;
        1: n_f1++;
        0: n_f0++;
        default: check(1'b0, $sformatf("frame with %0d bits", nd));
      endcase
      for (int i = 0; i < 6; i++)
        if (vn_dvalid[i]) begin out_bits++; out_ones += vn_dout[i]; end
      for (int i = 0; i < 5; i++)
        if (vn_dvalid_wait[i]) begin out_bits++; out_ones += vn_dout_wait[i]; end
      if (vn_dvalid_wait != 5'b0)
        check(vf_prev && !vn_vf, "waiting output only when a stored flag is paired");
      if (vf_prev && !vn_vf)
        case (vn_dvalid_wait)
          5'b11111: n_pair5++;
          5'b01111: n_pair4++;
          5'b00000: n_pair0++;
          default:  check(1'b0, "waiting output length");
        endcase
      if (!vf_prev && vn_vf) n_vf_set++;
      vf_prev = vn_vf;
    end
  end

  task automatic cycle(input bit hr);
    clk1 = 1; clk2 = 1; #4;          // LR
    if (hr) begin clk2 = 0; #2; end  // HR
    clk1 = 0; clk2 = 0; #1;          // OFF
    clk2 = 1; #3;                    // evaluation, sense
    if (hr) n_hr++; else n_lr_only++;
  endtask

  task automatic run(input bit hr);
    longint rb, ro, ob, oo;
    real p, exe, ex, ones;
    rb = raw_bits; ro = raw_ones; ob = out_bits; oo = out_ones;
    for (int c = 0; c < NCYC; c++) cycle(hr);
    p    = real'(raw_ones - ro) / real'(raw_bits - rb);
    exe  = real'(out_bits - ob) / real'(raw_bits - rb);
    ones = real'(out_ones - oo) / real'(out_bits - ob);
    ex   = exp_exe(p);
    $display("HR=%0d raw P(1) %0.4f  ExE %0.4f expected %0.4f  output P(1) %0.4f",
             hr, p, exe, ex, ones);
    check(exe > ex - 0.02 && exe < ex + 0.02, "extraction efficiency");
    check(ones > 0.48 && ones < 0.52, "post-processed output unbiased");
  endtask

  initial begin
    repeat (3) cycle(1'b1);
    rst_n = 1;
    run(1'b1);
    run(1'b0);
    $display("frames %0d: 6b %0d 3b %0d 2b %0d 1b %0d 0b %0d; pairs 5b %0d 4b %0d 0b %0d; VF set %0d; HR %0d LR-only %0d",
             n_frames, n_f6, n_f3, n_f2, n_f1, n_f0, n_pair5, n_pair4, n_pair0, n_vf_set, n_hr, n_lr_only);
    check(n_frames > 0, "frames delivered");
    check(n_f6 > 0, "6-bit frames");
    check(n_f3 > 0, "3-bit frames");
    check(n_f2 > 0, "2-bit frames");
    check(n_f1 > 0, "1-bit frames");
    check(n_f0 > 0, "0-bit frames");
    check(n_pair5 > 0, "waiting pairs giving 5 bits");
    check(n_pair4 > 0, "waiting pairs giving 4 bits");
    check(n_pair0 > 0, "waiting pairs giving no bits");
    check(n_vf_set > 0, "VF set");
    check(n_hr > 0, "cycles with HR phase");
    check(n_lr_only > 0, "cycles without HR phase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
