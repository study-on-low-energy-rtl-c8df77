// sense_latch: behavioural model of the strong-arm sense latch of an
// entropy source. Not synthesizable: it reads real-valued node voltages.
//
// On the rising edge of SEN it compares the two latch nodes and, after the
// resolution delay T_SENSE (simulation time units), holds q = (VGL > VGR)
// until the next SEN edge. A real strong-arm latch with an SR output latch
// behaves the same way at this level. The comparison at SEN follows the
// document; the delay and the power-up value of q are model choices.
module sense_latch #(
  parameter int unsigned T_SENSE = 1
) (
  input  logic sen,
  input  real  vgl,
  input  real  vgr,
  output logic q
);

  initial q = 1'b0;

  always @(posedge sen) begin
    #(T_SENSE);
    q <= (vgl > vgr);
  end

endmodule
