// es_latch: behavioural model of the entropy-source (ES) latch. It stands
// for an analog circuit (two cross-coupled inverters, each with a gate
// capacitor C_G, a large gate resistor R and switches S1-S3) and is not
// synthesizable: its outputs are real-valued node voltages.
//
// Operation, as the model reproduces it:
//  - Equalization (S1 on): each inverter has its gate tied to its drain,
//    so both sides settle at their own trip points, VeqL and VeqR, which
//    differ by the inverter mismatch d. The values are stored on C_G.
//  - LR phase (S3 on) settles quickly; in the HR phase (S3 off) the large
//    resistor turns the feedback loop into a damped oscillator that
//    amplifies thermal noise (about 3x in the document).
//  - Evaluation (S2 on): the inverters are cross-coupled starting from the
//    stored voltages, i.e. close to the metastable point. Only the
//    uncompensated part (1 - ETA_COM) * d of the mismatch remains, so the
//    latch resolves to VGL = VDD when (1 - ETA_COM) * d + noise > 0.
// The noise is Gaussian with sigma SIGMA_HR_MV if an HR phase preceded the
// evaluation, else SIGMA_LR_MV; it is drawn from a sum of 12 uniform
// numbers. The resulting P(VGL high) is Phi((1 - ETA_COM) * d / sigma).
// ETA_COM = 0.633 (C_G = 10 fF) and SIGMA_HR_MV = 2.26 mV (1.0 V, 27 C,
// 5 um resistor) are the document's figures; SIGMA_LR_MV = SIGMA_HR_MV / 3
// follows its "3 times enhanced" statement; the mismatch is a per-instance
// model parameter. Resolution and equalization are instantaneous. Each
// switch is a transmission gate driven by a complementary pair (s, sb): it
// conducts while its NMOS gate s is high or its PMOS gate sb is low, so a
// pair that is not truly complementary leaves the switch on.
module es_latch #(
  parameter real VDD         = 1.0,    // supply, V
  parameter real MISMATCH_MV = 0.0,    // inverter mismatch d, mV
  parameter real ETA_COM     = 0.633,  // mismatch compensation efficiency
  parameter real SIGMA_HR_MV = 2.26,   // noise rms with HR phase, mV
  parameter real SIGMA_LR_MV = 0.753   // noise rms without HR phase, mV
) (
  input  logic s1, input logic s1b,
  input  logic s2, input logic s2b,
  input  logic s3, input logic s3b,
  output real  vgl,
  output real  vgr
);

  function automatic real gauss();
    real acc = 0.0;
    for (int i = 0; i < 12; i++) acc += real'($urandom) / 4294967296.0;
    return acc - 6.0;
  endfunction

  // Node and phase state, held by the one process below.
  logic on1, on2, on3;   // switch conducts
  bit   hr_seen, s1_q, s2_q, s3_q;
  real vgl_r, vgr_r;

  initial begin
    hr_seen = 1'b0;
    s1_q    = 1'b0;
    s2_q    = 1'b0;
    s3_q    = 1'b0;
    vgl_r   = VDD / 2.0;
    vgr_r   = VDD / 2.0;
  end

  assign vgl = vgl_r;
  assign vgr = vgr_r;

  assign on1 = s1 | ~s1b;
  assign on2 = s2 | ~s2b;
  assign on3 = s3 | ~s3b;

  always @(on1 or on2 or on3) begin
    // Equalization starts: both sides settle at their own trip points.
    if (on1 && !s1_q) begin
      hr_seen = 1'b0;
      vgl_r   = VDD / 2.0 + MISMATCH_MV * 1.0e-3 / 2.0;
      vgr_r   = VDD / 2.0 - MISMATCH_MV * 1.0e-3 / 2.0;
    end
    // Leaving the LR phase while still equalizing starts the HR phase.
    if (!on3 && s3_q && on1) hr_seen = 1'b1;
    // Evaluation: resolve from the stored initial state.
    if (on2 && !s2_q) begin
      if ((1.0 - ETA_COM) * MISMATCH_MV
          + (hr_seen ? SIGMA_HR_MV : SIGMA_LR_MV) * gauss() > 0.0) begin
        vgl_r = VDD;
        vgr_r = 0.0;
      end else begin
        vgl_r = 0.0;
        vgr_r = VDD;
      end
    end
    s1_q = on1;
    s2_q = on2;
    s3_q = on3;
  end

endmodule
