// trng_top: complete low-energy TRNG, latch-based core plus VN_8W.
//
// The TRNG core produces one raw bit (XOR-OUT) per CLK1/CLK2 cycle; the
// VN_8W post-processor removes its residual bias and correlation and
// delivers full-entropy bits (VN-OUT) at up to 62.21 % of the raw rate.
// VN_8W is clocked by CLK1: its rising edge starts a new equalization, at
// which point xor_out still holds the previous cycle's result, so each
// CLK1 edge takes exactly one fresh raw bit. Outputs: the raw bits
// (es_out, xor_out) for monitoring, and VN_8W's direct and waiting output
// bits with their valid masks, updated once every 8 CLK1 cycles (vn_dstb).
// rst_n (active low, asynchronous) resets VN_8W only; the core has no
// state to reset. The composition follows the document; clocking VN_8W
// from CLK1 is this design's choice.
module trng_top #(
  parameter int unsigned N_ES = 4
) (
  input  logic            clk1,
  input  logic            clk2,
  input  logic            rst_n,
  output logic [N_ES-1:0] es_out,
  output logic            xor_out,
  output logic [5:0]      vn_dout,
  output logic [5:0]      vn_dvalid,
  output logic [4:0]      vn_dout_wait,
  output logic [4:0]      vn_dvalid_wait,
  output logic            vn_dstb,
  output logic            vn_vf
);

  trng_core #(.N_ES(N_ES)) u_core (
    .clk1, .clk2, .es_out, .xor_out
  );

  vn8w u_vn8w (
    .clk         (clk1),
    .rst_n,
    .din         (xor_out),
    .dout        (vn_dout),
    .dvalid      (vn_dvalid),
    .dout_wait   (vn_dout_wait),
    .dvalid_wait (vn_dvalid_wait),
    .dstb        (vn_dstb),
    .vf          (vn_vf)
  );

endmodule
