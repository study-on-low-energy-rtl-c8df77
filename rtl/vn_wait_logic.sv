// vn_wait_logic: the "Waiting Logic" of VN_8W, shared by all base-7 flags.
//
// Two base-7 waiting flags, w1 (the older, W5..W3) and w2 (the newer,
// W2..W0), form one of 49 equiprobable cases. 49 = 32 + 16 + 1, so 32 cases
// give 5 bits, 16 give 4 bits and one gives nothing. With input-symbol
// codes only two output patterns are needed:
//   w2 = 0..5 : dout = {W1, W0, W5, W4, W3}   (5 bits if w2 < 4, else the
//               low 4 bits, since W1 = 0 then)
//   w2 = 6    : dout = {W4, W3, W2, W2, W2}   (5 bits if w1 < 4, 4 bits if
//               w1 = 4 or 5, none if w1 = 6)
// Purely combinational; dvalid marks the valid bits of dout. Both patterns
// and the valid masks follow the document.
module vn_wait_logic
  import vn8w_pkg::*;
(
  input  flag7_t      w1,
  input  flag7_t      w2,
  output logic [4:0]  dout,
  output logic [4:0]  dvalid
);

  always_comb begin
    if (w2 != 3'd6) begin
      dout   = {w2[1:0], w1};
      dvalid = w2[2] ? 5'b01111 : 5'b11111;
    end else begin
      dout   = {w1[1:0], {3{w2[2]}}};
      dvalid = (w1 == 3'd6) ? 5'b00000 :
               w1[2]        ? 5'b01111 : 5'b11111;
    end
  end

endmodule
