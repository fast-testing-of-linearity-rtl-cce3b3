// sample_hold: behavioural model of the sample-and-hold circuit (analog; not
// synthesizable logic).
//
// While 'sample' is high the output follows the analog input; when 'sample'
// falls the output holds the last value for the rest of the conversion.
// Voltages are real numbers in LSB units, the input range being 0 .. 2^N-1
// as in the normalised description of the search algorithm. The model is
// ideal: no droop, no kT/C noise, no aperture delay.
`timescale 1ns / 1ps
module sample_hold (
  input  logic sample,
  input  real  vin,
  output real  vhold
);

  initial vhold = 0.0;

  // Track-and-hold is a latch by nature.
  always_latch begin
    if (sample) vhold = vin;
  end

endmodule
