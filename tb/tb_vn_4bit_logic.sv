// tb_vn_4bit_logic: exhaustive check of the 4 Bits Logic.
// All 16 inputs are applied. N is compared with a popcount; D and W are
// compared, on the entries where they carry information, with the binary
// code tables of the design description (D: weights 1 and 3 use both bits,
// weight 2 uses D[0]; W: weight 2 only), written out here as literals.
module tb_vn_4bit_logic;
  import vn8w_pkg::*;

  logic [3:0] x;
  half_t      half;
  int checks = 0, failures = 0;

  vn_4bit_logic dut (.x, .half);

  // Reference codes indexed by {X3,X2,X1,X0}; 'x' entries are "don't care".
  // D for weight 1/3 (2 bits), D[0] for weight 2, W for weight 2.
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
      4'b0011, 4'b1100: return 2'd0;
      4'b0101, 4'b0110: return 2'd1;
      4'b1001, 4'b1010: return 2'd2;
      default:          return 2'd0;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 16; i++) begin
      int pc;
      x = 4'(i);
      #1;
      pc = $countones(x);
      checks++;
      if (half.n != 3'(pc)) begin
        failures++; $display("FAIL x=%b n=%0d exp %0d", x, half.n, pc);
      end
      if (pc == 1 || pc == 3) begin
        checks++;
        if (half.d != ref_d(x)) begin failures++; $display("FAIL x=%b d=%b exp %b", x, half.d, ref_d(x)); end
      end
      if (pc == 2) begin
        checks += 2;
        if (half.d[0] != ref_d(x)[0]) begin failures++; $display("FAIL x=%b d0=%b", x, half.d[0]); end
        if (half.w != ref_w(x)) begin failures++; $display("FAIL x=%b w=%0d exp %0d", x, half.w, ref_w(x)); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
