// vn_4bit_logic: the "4 Bits Logic" of VN_8W (an extended VN_4W).
//
// For a 4-bit input X3..X0 it returns the Hamming weight N, two direct
// symbol bits D and a base-3 waiting flag W, all purely combinational.
// D and W use input-symbol-based code assignment: input bits are reused as
// output codes, so no lookup table is needed:
//   D = (X1 == X0) ? {X2, X2} : {X1, X0}
//   W = (X3 == X2) ? 2'b00    : {X3, X2}
// Meaning by weight: N = 1 or 3 -> D holds 2 unbiased bits (4 equiprobable
// members); N = 2 -> D[0] is 1 unbiased bit and W is a flag 0..2 (6 members
// = 2 x 3); N = 0 or 4 -> nothing. The weight-dependent validity is decided
// downstream by vn_8bit_logic. The equations and the adder for N follow the
// document; the port packing into half_t is this design's choice.
module vn_4bit_logic
  import vn8w_pkg::*;
(
  input  logic [3:0] x,     // x[3] = X3 ... x[0] = X0
  output half_t      half
);

  always_comb begin
    half.n = 3'(x[3]) + 3'(x[2]) + 3'(x[1]) + 3'(x[0]);
    half.d = (x[1] == x[0]) ? {x[2], x[2]} : {x[1], x[0]};
    half.w = (x[3] == x[2]) ? 2'b00 : {x[3], x[2]};
  end

endmodule
