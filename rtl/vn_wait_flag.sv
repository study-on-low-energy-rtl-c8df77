// vn_wait_flag: waiting-flag register of VN_8W.
//
// Holds at most one base-7 waiting flag between frames. When a frame
// (strobe `en`) brings a valid flag and none is held, the flag is stored
// and VF is set. When one is already held, the stored flag (w1) and the
// frame's own flag form a pair for the Waiting Logic (pair_valid, same
// cycle, combinational) and VF is cleared. Frames without a flag leave the
// register alone. The document names this register and its VF bit; the
// exact update rule is this design's reading of it. Reset (active low)
// clears VF.
module vn_wait_flag
  import vn8w_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,          // frame strobe
  input  flag7_t flag,        // DWAIT of the current frame
  input  logic   flag_valid,  // DWAIT is meaningful
  output flag7_t w1,          // stored (older) flag
  output logic   pair_valid,  // w1 and flag form a pair this cycle
  output logic   vf           // a flag is being held
);

  flag7_t flag_q;
  logic   vf_q;

  assign w1         = flag_q;
  assign vf         = vf_q;
  assign pair_valid = en && flag_valid && vf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flag_q <= '0;
      vf_q   <= 1'b0;
    end else if (en && flag_valid) begin
      if (vf_q) begin
        vf_q <= 1'b0;
      end else begin
        flag_q <= flag;
        vf_q   <= 1'b1;
      end
    end
  end

  // A stored flag is always a legal base-7 digit.
  assert property (@(posedge clk) disable iff (!rst_n) vf_q |-> flag_q <= 3'd6);

endmodule
