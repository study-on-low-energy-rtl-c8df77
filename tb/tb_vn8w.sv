// tb_vn8w: end-to-end test of the VN_8W post-processor.
//  1. Exhaustive sweep: all 256 bytes are sent serially (MSB first). For
//     each frame the number of direct bits must match the bit-assignment
//     strategy for the byte's Hamming weight, all direct codes of one
//     weight group must differ (groups with a waiting flag: each code
//     exactly 7 times, once per flag value), the VF bit must follow the parity of the
//     waiting flags seen so far (flags come from weights 2, 3, 5 and 6),
//     and results must arrive every 8 clocks, 2 clocks after the last bit.
//  2. Extraction efficiency: i.i.d. streams with P(1) = 0.5, 0.54, 0.6, 0.7
//     and 0.8 (bias 0, 4, 10, 20, 30 %) must give the expected efficiency
//     within 1 % (62.21 % at zero bias) and output bits with P(1) within 1 %
//     of 0.5. Two more streams at P(1) = 0.27 and 0.73, the edges of the
//     range the entropy core is designed to stay within, must still give
//     about 50 % efficiency.
module tb_vn8w;
  import vn8w_pkg::*;
  logic clk = 0, rst_n = 0, din = 0;
  logic [5:0] dout, dvalid;
  logic [4:0] dout_wait, dvalid_wait;
  logic dstb, vf;
  int checks = 0, failures = 0;

  vn8w dut (.clk, .rst_n, .din, .dout, .dvalid, .dout_wait, .dvalid_wait, .dstb, .vf);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // bookkeeping filled by the output monitor
  longint cyc = 0, last_bit_cyc = 0, last_dstb = -1;
  longint out_bits = 0, out_ones = 0, in_bits = 0, wait_bits = 0;
  int frame_lens [$];
  int frame_codes [$];
  bit frame_vf [$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && dstb) begin
      int len, code;
      len = 0; code = 0;
      for (int i = 5; i >= 0; i--)
        if (dvalid[i]) begin len++; code = code * 2 + int'(dout[i]); out_ones += dout[i]; end
      for (int i = 4; i >= 0; i--)
        if (dvalid_wait[i]) begin wait_bits++; out_ones += dout_wait[i]; end
      out_bits += longint'(len);
      out_bits += longint'($countones(dvalid_wait));
      frame_lens.push_back(len);
      frame_codes.push_back(code);
      frame_vf.push_back(vf);
      if (last_dstb >= 0) check(cyc - last_dstb == 8, $sformatf("frame gap %0d", cyc - last_dstb));
      last_dstb = cyc;
    end
  end

  function automatic real binom(int n, int k);
    real r = 1.0;
    for (int i = 0; i < k; i++) r = r * real'(n - i) / real'(i + 1);
    return r;
  endfunction

  function automatic real exp_exe(real p);
    real b [9] = '{0.0, 3.0, 2.0 + 16.0/7.0, 3.0 + 16.0/7.0, 394.0/70.0,
                   3.0 + 16.0/7.0, 2.0 + 16.0/7.0, 3.0, 0.0};
    real e = 0.0;
    for (int k = 0; k <= 8; k++) e += binom(8, k) * (p ** k) * ((1.0 - p) ** (8 - k)) * b[k];
    return e / 8.0;
  endfunction

  task automatic send(input logic bitv);
    @(negedge clk);
    din = bitv;
    in_bits++;
  endtask

  initial begin
    static int exp_len [9] = '{0, 3, 2, 3, -1, 3, 2, 3, 0};
    int seen [int];
    static int nflags = 0;
    int len4 [7];
    foreach (len4[i]) len4[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // ---- 1. exhaustive sweep: 256 bytes back to back --------------------
    for (int v = 0; v < 256; v++)
      for (int i = 7; i >= 0; i--) send(1'(v >> i));
    repeat (4) @(posedge clk);
    #1;
    check(frame_lens.size() == 256, $sformatf("frames %0d", frame_lens.size()));
    for (int v = 0; v < 256 && v < frame_lens.size(); v++) begin
      int k, len, key;
      k = $countones(8'(v));
      len = frame_lens[v];
      if (k == 4) begin
        check(len == 6 || len == 2 || len == 1, $sformatf("byte %h len %0d", v, len));
        if (len <= 6) len4[len]++;
      end else
        check(len == exp_len[k], $sformatf("byte %h len %0d exp %0d", v, len, exp_len[k]));
      key = k * 1000 + len * 100 + frame_codes[v];
      if (seen.exists(key)) seen[key]++; else seen[key] = 1;
      if (k == 2 || k == 3 || k == 5 || k == 6) nflags++;
      check(frame_vf[v] == 1'(nflags % 2), $sformatf("vf after byte %h", v));
    end
    // each direct code occurs once per group, or 7 times (once per
    // waiting-flag value) in the groups that carry a flag
    foreach (seen[key]) begin
      int k, need;
      k = key / 1000;
      need = (k == 2 || k == 3 || k == 5 || k == 6) ? 7 : 1;
      check(seen[key] == need, $sformatf("group %0d code key %0d seen %0d times", k, key, seen[key]));
    end
    check(seen.num() == 2 + 8 + 8 + 4 + 4 + 8 + 8 + 64 + 4 + 2, $sformatf("distinct codes %0d", seen.num()));
    check(len4[6] == 64 && len4[2] == 4 && len4[1] == 2,
          $sformatf("weight-4 split %0d/%0d/%0d", len4[6], len4[2], len4[1]));
    $display("sweep done: %0d checks, %0d failures", checks, failures);
  end

  initial begin
    static real ps [7] = '{0.5, 0.54, 0.6, 0.7, 0.8, 0.27, 0.73};
    // start once the sweep has been sent and checked
    wait (in_bits >= 256 * 8);
    repeat (20) @(posedge clk);
    foreach (ps[j]) begin
      real exe, ones, ex;
      longint b0, o0, n0;
      @(negedge clk);
      b0 = out_bits; o0 = out_ones; n0 = in_bits;
      for (int i = 0; i < 160000; i++) begin
        @(negedge clk);
        din = ($urandom % 10000) < int'(ps[j] * 10000.0);
        in_bits++;
      end
      repeat (10) @(posedge clk);
      exe  = real'(out_bits - b0) / real'(in_bits - n0);
      ones = real'(out_ones - o0) / real'(out_bits - b0);
      ex   = exp_exe(ps[j]);
      $display("P(1)=%0.2f  ExE measured %0.4f expected %0.4f  output P(1) %0.4f", ps[j], exe, ex, ones);
      check(exe > ex - 0.01 && exe < ex + 0.01, "extraction efficiency");
      check(ones > 0.49 && ones < 0.51, "output bias");
      // the core's design target: raw P(1) in [0.27, 0.73] keeps ExE >= 50 %
      if (ps[j] == 0.27 || ps[j] == 0.73)
        check(ex >= 0.5 && exe > 0.49, "ExE at the edge of the raw-P(1) target range");
    end
    check(wait_bits > 0, "waiting logic produced bits");
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
