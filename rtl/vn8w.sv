// vn8w: 8-bit von Neumann post-processor with waiting strategy (VN_8W).
//
// Turns a biased raw bitstream into unbiased bits with up to 62.21 %
// extraction efficiency (at zero input bias). Eight raw bits are gathered
// by the SIPO; the byte is split into its even bits (4 Bits Logic A) and odd
// bits (4 Bits Logic B), which also scrambles neighbouring, possibly
// correlated, bits into different halves. The 8 Bits Logic works on the two
// Hamming weights and emits up to six direct bits plus an optional base-7
// waiting flag. Flags are paired by the waiting-flag register and turned
// into up to five more bits by the Waiting Logic.
//
// Interface: one raw bit `din` per clock. Once per 8 clocks (`dstb` high for
// one clock) new results appear and are held until the next frame:
//   dout[5:0]/dvalid[5:0]             direct bits and their valid mask
//   dout_wait[4:0]/dvalid_wait[4:0]   waiting bits and their valid mask
//   vf                                a waiting flag is being held
// A reader takes the valid bits of dout from bit 5 down to bit 0, then the
// valid bits of dout_wait from bit 4 down to 0.
// Latency: results of a frame are visible two clocks after its eighth bit
// was sampled. The output registers updated by a strobe stand in for the
// document's gated clock CLK7; the strobe `dstb` and the bit order of the
// even/odd split are this design's choices.
module vn8w
  import vn8w_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       din,
  output logic [DOUT_W-1:0] dout,
  output logic [DOUT_W-1:0] dvalid,
  output logic [WOUT_W-1:0] dout_wait,
  output logic [WOUT_W-1:0] dvalid_wait,
  output logic       dstb,
  output logic       vf
);

  logic [7:0] word;
  logic       wstb;
  half_t      ha, hb;
  logic [5:0] m_dout, m_dvalid;
  flag7_t     m_dwait, w1;
  logic       m_dwait_valid, pair_valid;
  logic [4:0] wl_dout, wl_dvalid;

  vn_sipo8 u_sipo (
    .clk, .rst_n, .din, .word, .wstb
  );

  vn_4bit_logic u_logic_a (.x({word[6], word[4], word[2], word[0]}), .half(ha));
  vn_4bit_logic u_logic_b (.x({word[7], word[5], word[3], word[1]}), .half(hb));

  vn_8bit_logic u_logic_8 (
    .a(ha), .b(hb),
    .dout(m_dout), .dvalid(m_dvalid),
    .dwait(m_dwait), .dwait_valid(m_dwait_valid)
  );

  vn_wait_flag u_wflag (
    .clk, .rst_n,
    .en(wstb), .flag(m_dwait), .flag_valid(m_dwait_valid),
    .w1, .pair_valid, .vf
  );

  vn_wait_logic u_wlogic (
    .w1, .w2(m_dwait), .dout(wl_dout), .dvalid(wl_dvalid)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout        <= '0;
      dvalid      <= '0;
      dout_wait   <= '0;
      dvalid_wait <= '0;
      dstb        <= 1'b0;
    end else begin
      dstb <= wstb;
      if (wstb) begin
        dout        <= m_dout;
        dvalid      <= m_dvalid;
        dout_wait   <= wl_dout;
        dvalid_wait <= pair_valid ? wl_dvalid : 5'b00000;
      end
    end
  end

endmodule
