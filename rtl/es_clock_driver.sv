// es_clock_driver: switch-signal generator of one entropy source.
//
// The two external clocks CLK1 and CLK2 step through four phases in Gray
// order, so only one input changes at a time and no switch pair can
// overlap:
//   CLK1 CLK2  phase               S1  S3  S2  SEN
//    1    1    equalization, LR     on  on  off off
//    1    0    equalization, HR     on  off off off
//    0    0    OFF (guard)          off off off off
//    0    1    evaluation           off off on  on
// S1 equalizes the gate and drain of each latch inverter onto its gate
// capacitor, S3 shorts the large gate resistor (low-resistance phase),
// S2 closes the cross-coupled loop, SEN fires the sense latch. Every
// switch signal comes with its complement, as the transmission-gate
// switches need both. The document gives the phases, the complementary
// pairs, the OFF guard phase and that two clocks drive them; the exact
// decoding of CLK1/CLK2 is this design's choice. SEN has the same logic
// value as S2 and is kept as its own output because on silicon it drives a
// different load (the sense latch); the sense-latch model adds the short
// delay between the latch resolving and its read-out. Purely combinational.
module es_clock_driver (
  input  logic clk1,
  input  logic clk2,
  output logic s1,  output logic s1b,
  output logic s2,  output logic s2b,
  output logic s3,  output logic s3b,
  output logic sen
);

  always_comb begin
    s1  = clk1;
    s3  = clk1 & clk2;
    s2  = ~clk1 & clk2;
    sen = ~clk1 & clk2;
    s1b = ~s1;
    s2b = ~s2;
    s3b = ~s3;
  end

endmodule
