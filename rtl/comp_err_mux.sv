// comp_err_mux: comparator-error injection multiplexer (MUX4) of the
// non-binary SAR ADC built-in self test.
//
// It sits between the comparator and the SAR logic. With sel = SEL_NORMAL the
// comparator decision passes unchanged; SEL_INVERT inverts it, which forces a
// decision error at the chosen step; SEL_FORCE0 and SEL_FORCE1 force the
// decision to 0 or 1 so that either branch of the search can be taken on
// purpose. The four functions and their select codes (0, 1, 3, 4) follow the
// published test scheme; treating the unused codes 2, 5, 6 and 7 as normal
// operation is this design's choice. Purely combinational, no clock.
`timescale 1ns / 1ps
module comp_err_mux
  import sar_pkg::*;
(
  input  logic     comp_in,  // raw comparator decision, 1 when Vin > Vref
  input  err_sel_e sel,      // injection select, driven by the test controller / ATE
  output logic     d_out     // decision seen by the SAR logic
);

  always_comb begin
    unique case (sel)
      SEL_INVERT: d_out = ~comp_in;
      SEL_FORCE0: d_out = 1'b0;
      SEL_FORCE1: d_out = 1'b1;
      default:    d_out = comp_in;
    endcase
  end

endmodule
