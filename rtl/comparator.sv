// comparator: behavioural model of the SAR comparator (analog; not
// synthesizable logic).
//
// out = 1 when the held input is above the DAC reference plus OFFSET, else 0:
// the decision d(k) of the search algorithm. The decision is continuous in
// time; the SAR logic samples it on the clock edge that ends each step.
// OFFSET (in LSB) models a static comparator offset and is 0 by default.
`timescale 1ns / 1ps
module comparator #(
  parameter real OFFSET = 0.0
) (
  input  real  vp,   // held analog input
  input  real  vn,   // DAC reference
  output logic out
);

  assign out = (vp > vn + OFFSET);

endmodule
