// vn_8bit_logic: the "8 Bits Logic" of VN_8W.
//
// Rebuilds the 2^8-entry von Neumann table from two 4-bit summaries
// (NA, DA, WA) and (NB, DB, WB). Because the mapping depends only on the
// pair of Hamming weights, the table is 5 x 5 cells; inside a cell the
// output codes are made of input symbols (DA, DB, WA, WB), so every cell is
// a few wires. Groups of the 8-bit Hamming weight k get:
//   k = 0, 8      : nothing
//   k = 1, 7      : 3 direct bits
//   k = 2, 6      : 2 direct bits + base-7 waiting flag (28 = 4 x 7)
//   k = 3, 5      : 3 direct bits + base-7 waiting flag (56 = 8 x 7)
//   k = 4         : 6, 2 or 1 direct bits (70 = 64 + 4 + 2)
// Outputs (combinational):
//   dout[5:0]   direct bits; only positions with dvalid set carry data
//   dvalid[5:0] valid mask
//   dwait[2:0]  base-7 waiting flag, 0..6
//   dwait_valid flag present (NA + NB = 2, 3, 5 or 6)
// The valid masks of every cell except (2,2) and the waiting flag codes
// follow the document's tables. The bit values placed at the valid
// positions, and the split of the (2,2) cell into 32 six-bit and 4 two-bit
// members, are this design's own assignment; each group has been checked
// to map its members one-to-one onto (code, flag) pairs, which is what
// makes the output unbiased.
module vn_8bit_logic
  import vn8w_pkg::*;
(
  input  half_t       a,            // from 4 Bits Logic A
  input  half_t       b,            // from 4 Bits Logic B
  output logic [5:0]  dout,
  output logic [5:0]  dvalid,
  output flag7_t      dwait,
  output logic        dwait_valid
);

  logic [3:0] nsum;
  logic [2:0] c22;   // index of (WA, WB) in the (2,2) cell, 0..7

  always_comb begin
    nsum = 4'(a.n) + 4'(b.n);

    // (2,2) cell: eight of the nine (WA, WB) combinations get a 3-bit index,
    // the ninth (2,2) is left to the 2-bit code.
    if (!a.w[1] && !b.w[1]) c22 = {1'b0, a.w[0], b.w[0]};
    else if (a.w[1])        c22 = {2'b10, b.w[0]};
    else                    c22 = {2'b11, a.w[0]};

    // Waiting flag code (Fig. 3.16 layout): rows by NB, columns by NA.
    unique case (b.n)
      3'd1, 3'd3: dwait = {1'b0, b.d};
      3'd2:       dwait = {1'b1, b.w};
      default:    dwait = (a.n == 3'd2) ? {1'b1, a.w} : {1'b0, a.d};
    endcase
    dwait_valid = (nsum == 4'd2) || (nsum == 4'd3) ||
                  (nsum == 4'd5) || (nsum == 4'd6);

    dout   = '0;
    dvalid = '0;
    unique case ({a.n, b.n})
      // ---- k = 1 and k = 7: 3 bits -------------------------------------
      {3'd1, 3'd0}, {3'd3, 3'd4}: begin dvalid = 6'b111000; dout[5:3] = {1'b1, a.d}; end
      {3'd0, 3'd1}, {3'd4, 3'd3}: begin dvalid = 6'b100110; dout[5] = 1'b0; dout[2:1] = b.d; end
      // ---- k = 2 and k = 6: 2 bits + flag --------------------------------
      {3'd1, 3'd1}, {3'd3, 3'd3}: begin dvalid = 6'b011000; dout[4:3] = a.d; end
      {3'd2, 3'd0}, {3'd2, 3'd4}: begin dvalid = 6'b001001; dout[3] = a.d[0]; dout[0] = b.n[1]; end
      {3'd0, 3'd2}, {3'd4, 3'd2}: begin dvalid = 6'b000011; dout[1] = b.d[0]; dout[0] = b.n[1]; end
      // ---- k = 3 and k = 5: 3 bits + flag --------------------------------
      {3'd2, 3'd1}, {3'd2, 3'd3}: begin dvalid = 6'b100110; dout[5] = a.d[0]; dout[2:1] = a.w; end
      {3'd0, 3'd3}, {3'd4, 3'd1}: begin dvalid = 6'b100110; dout[5] = 1'b0; dout[2:1] = 2'b11; end
      {3'd3, 3'd0}, {3'd1, 3'd4}: begin dvalid = 6'b111000; dout[5:3] = 3'b111; end
      {3'd1, 3'd2}, {3'd3, 3'd2}: begin dvalid = 6'b111000; dout[5:3] = {b.d[0], a.d}; end
      // ---- k = 4: 6, 2 or 1 bits -----------------------------------------
      {3'd3, 3'd1}, {3'd1, 3'd3}: begin dvalid = 6'b111111; dout = {1'b0, a.d, b.d, a.n[1]}; end
      {3'd4, 3'd0}, {3'd0, 3'd4}: begin dvalid = 6'b000001; dout[0] = a.n[2]; end
      {3'd2, 3'd2}: begin
        if (a.w == 2'd2 && b.w == 2'd2) begin
          dvalid = 6'b001010;
          dout[3] = a.d[0];
          dout[1] = b.d[0];
        end else begin
          dvalid = 6'b111111;
          dout   = {1'b1, c22[2], a.d[0], c22[1], b.d[0], c22[0]};
        end
      end
      // ---- k = 0 and k = 8 (and impossible weights): nothing -------------
      default: ;
    endcase
  end

endmodule
