// vn_sipo8: serial-in parallel-out front end of VN_8W (SIPO8).
//
// Shifts one raw bit in per clock. After every eighth bit the complete
// byte is copied into `word` and `wstb` pulses for one clock; `word` then
// stays stable for the next eight clocks. This strobe plays the role of the
// gated clock CLK7 of the document, which wakes the mapping logic once
// every eight clocks: here it is a clock enable rather than a gated clock,
// which is this design's choice. word[7] is the oldest bit of the frame,
// word[0] the newest. Reset (active low) restarts the frame count.
// Timing: the eighth bit sampled at edge t appears in `word` after edge t,
// with wstb high during the following cycle.
module vn_sipo8
  import vn8w_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       din,
  output logic [7:0] word,
  output logic       wstb
);

  logic [6:0] sr;
  logic [2:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= '0;
      cnt  <= '0;
      word <= '0;
      wstb <= 1'b0;
    end else begin
      sr   <= {sr[5:0], din};
      cnt  <= cnt + 3'd1;
      wstb <= (cnt == 3'(FRAME_BITS - 1));
      if (cnt == 3'(FRAME_BITS - 1)) word <= {sr, din};
    end
  end

endmodule
