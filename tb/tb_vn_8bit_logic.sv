// tb_vn_8bit_logic: exhaustive check of the 8 Bits Logic.
// All 256 combinations of two 4-bit halves are applied; the half summaries
// (weight, D, W) are built here from the binary code tables of the design
// description. Checked per 8-bit input:
//   - the valid mask against the 5 x 5 DVALID table of the description
//     (the (2,2) cell, which the description leaves open, must give 6 or 2
//     bits),
//   - the waiting flag code against the DWAIT table, and its valid bit
//     against "NA + NB is 2, 3, 5 or 6".
// Checked per Hamming-weight group: every member has the bit count the
// bit-assignment strategy gives it, all (code, flag) pairs differ, and each
// flag value 0..6 occurs equally often. Together these make the output
// unbiased for i.i.d. input. The total over all 256 inputs must be 890
// direct bits and 168 flags (62.21 % extraction efficiency).
module tb_vn_8bit_logic;
  import vn8w_pkg::*;

  half_t a, b;
  logic [5:0] dout, dvalid;
  flag7_t dwait;
  logic dwait_valid;
  int checks = 0, failures = 0;

  vn_8bit_logic dut (.a, .b, .dout, .dvalid, .dwait, .dwait_valid);

  // DVALID table, [NB][NA].
  localparam logic [5:0] DV [5][5] = '{
    '{6'b000000, 6'b111000, 6'b001001, 6'b111000, 6'b000001},
    '{6'b100110, 6'b011000, 6'b100110, 6'b111111, 6'b100110},
    '{6'b000011, 6'b111000, 6'b111111, 6'b111000, 6'b000011},
    '{6'b100110, 6'b111111, 6'b100110, 6'b011000, 6'b100110},
    '{6'b000001, 6'b111000, 6'b001001, 6'b111000, 6'b000000}};

  function automatic logic [1:0] ref_d(input logic [3:0] v);
    case (v)
      4'b0001: return 2'b01;  4'b0010: return 2'b10;
      4'b0100: return 2'b11;  4'b1000: return 2'b00;
      4'b1110: return 2'b10;  4'b1101: return 2'b01;
      4'b1011: return 2'b00;  4'b0111: return 2'b11;
      4'b0011: return 2'b00;  4'b0101: return 2'b01;
      4'b0110: return 2'b00;  4'b1001: return 2'b01;
      4'b1010: return 2'b00;  4'b1100: return 2'b01;
      default: return 2'b00;
    endcase
  endfunction
  function automatic logic [1:0] ref_w(input logic [3:0] v);
    case (v)
      4'b0101, 4'b0110: return 2'd1;
      4'b1001, 4'b1010: return 2'd2;
      default:          return 2'd0;
    endcase
  endfunction
  function automatic half_t mk(input logic [3:0] v);
    half_t h;
    h.n = 3'($countones(v));
    h.d = ref_d(v);
    h.w = ref_w(v);
    return h;
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  int seen [int];               // key -> count
  int len_cnt [9][7];           // [k][bits]
  int flag_cnt [9][7];          // [k][flag]
  int total_bits = 0, total_flags = 0;

  initial begin
    for (int ia = 0; ia < 16; ia++) begin
      for (int ib = 0; ib < 16; ib++) begin
        int na, nb, k, len, code, key;
        logic [2:0] exp_wait;
        a = mk(4'(ia)); b = mk(4'(ib));
        #1;
        na = int'(a.n); nb = int'(b.n); k = na + nb;
        // valid mask
        if (na == 2 && nb == 2)
          check(dvalid == 6'b111111 || dvalid == 6'b001010,
                $sformatf("(2,2) mask %b", dvalid));
        else
          check(dvalid == DV[nb][na], $sformatf("mask NA=%0d NB=%0d got %b", na, nb, dvalid));
        // waiting flag
        if (nb == 1 || nb == 3)  exp_wait = {1'b0, b.d};
        else if (nb == 2)        exp_wait = {1'b1, b.w};
        else if (na == 2)        exp_wait = {1'b1, a.w};
        else                     exp_wait = {1'b0, a.d};
        check(dwait_valid == (k == 2 || k == 3 || k == 5 || k == 6),
              $sformatf("dwait_valid NA=%0d NB=%0d", na, nb));
        if (dwait_valid) begin
          check(dwait == exp_wait, $sformatf("dwait NA=%0d NB=%0d got %0d exp %0d", na, nb, dwait, exp_wait));
          check(dwait <= 3'd6, "flag range");
          if (dwait <= 3'd6) flag_cnt[k][dwait]++;
          total_flags++;
        end
        // compact the valid bits into a code
        len = 0; code = 0;
        for (int i = 5; i >= 0; i--)
          if (dvalid[i]) begin code = code * 2 + int'(dout[i]); len++; end
        if (len <= 6) len_cnt[k][len]++;
        total_bits += len;
        key = k * 100000 + len * 10000 + code * 10 + (dwait_valid ? int'(dwait) : 9);
        check(!seen.exists(key), $sformatf("duplicate code in group %0d: len %0d code %0d", k, len, code));
        seen[key] = 1;
      end
    end
    // per-group bit counts
    check(len_cnt[0][0] == 1 && len_cnt[8][0] == 1, "g0/g8");
    check(len_cnt[1][3] == 8 && len_cnt[7][3] == 8, "g1/g7 3 bits");
    check(len_cnt[2][2] == 28 && len_cnt[6][2] == 28, "g2/g6 2 bits");
    check(len_cnt[3][3] == 56 && len_cnt[5][3] == 56, "g3/g5 3 bits");
    check(len_cnt[4][6] == 64 && len_cnt[4][2] == 4 && len_cnt[4][1] == 2, "g4 6/2/1 bits");
    for (int k = 2; k <= 6; k++) begin
      if (k == 4) continue;
      for (int f = 0; f < 7; f++)
        check(flag_cnt[k][f] * 7 == ((k == 2 || k == 6) ? 28 : 56),
              $sformatf("group %0d flag %0d count %0d", k, f, flag_cnt[k][f]));
    end
    check(total_bits == 890, $sformatf("total direct bits %0d", total_bits));
    check(total_flags == 168, $sformatf("total flags %0d", total_flags));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
