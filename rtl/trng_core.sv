// trng_core: latch-based TRNG core, four entropy sources and a 4-bit XOR.
//
// Each entropy source (ES) is a clock driver, an ES latch and a sense
// latch. All four share the external clocks CLK1/CLK2, which step every
// source through equalization (LR then HR), an OFF guard phase and
// evaluation once per TRNG cycle (see es_clock_driver). At the start of
// evaluation the ES latches resolve, the sense latches capture their
// outputs (es_out), and xor_out = XOR of the four, held until the next
// evaluation. XORing four sources relaxes the tolerable mismatch spread
// about 8x, which is what gives 6-sigma robustness without calibration.
// The structure follows the document. The per-source mismatches
// ES_MISMATCH_MV are analog model parameters (this design's example
// values, of the order the document measured); the three noise and
// compensation figures are passed to every ES latch.
module trng_core #(
  parameter int unsigned N_ES        = 4,
  parameter real         ETA_COM     = 0.633,
  parameter real         SIGMA_HR_MV = 2.26,
  parameter real         SIGMA_LR_MV = 0.753,
  parameter real         ES_MISMATCH_MV [4] = '{3.0, -2.0, 4.5, -1.0}
) (
  input  logic            clk1,
  input  logic            clk2,
  output logic [N_ES-1:0] es_out,
  output logic            xor_out
);

  for (genvar i = 0; i < N_ES; i++) begin : g_es
    logic s1, s1b, s2, s2b, s3, s3b, sen;
    real  vgl, vgr;

    es_clock_driver u_drv (
      .clk1, .clk2, .s1, .s1b, .s2, .s2b, .s3, .s3b, .sen
    );

    es_latch #(
      .MISMATCH_MV (ES_MISMATCH_MV[i % 4]),
      .ETA_COM     (ETA_COM),
      .SIGMA_HR_MV (SIGMA_HR_MV),
      .SIGMA_LR_MV (SIGMA_LR_MV)
    ) u_latch (
      .s1, .s1b, .s2, .s2b, .s3, .s3b, .vgl, .vgr
    );

    sense_latch u_sense (.sen, .vgl, .vgr, .q(es_out[i]));
  end

  es_xor #(.N(N_ES)) u_xor (.es(es_out), .xor_out);

endmodule
