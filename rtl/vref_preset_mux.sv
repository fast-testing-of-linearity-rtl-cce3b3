// vref_preset_mux: start-point multiplexer of the DC-linearity test mode.
//
// In normal operation a conversion starts at step 0 with the reference at
// mid-scale, 2^(N-1), and runs all num_steps comparisons. In test mode the
// reference is preset to the value read from the test-mode RAM and the
// conversion starts late, at step num_steps - test_steps, so only the last
// test_steps comparisons (with their small weights) are made around the
// known input. test_steps larger than num_steps is clamped to a full
// conversion, and test_steps = 0 is treated as one step; both are this
// design's choices. Combinational.
`timescale 1ns / 1ps
module vref_preset_mux #(
  parameter int unsigned N_BITS    = sar_pkg::N_BITS_DEF,
  parameter int unsigned MAX_STEPS = sar_pkg::MAX_STEPS_DEF,
  localparam int unsigned VW = N_BITS + 2,
  localparam int unsigned SW = $clog2(MAX_STEPS + 1)
) (
  input  logic                 test_mode,
  input  logic signed [VW-1:0] test_vref,   // from the test-mode RAM
  input  logic [SW-1:0]        num_steps,   // length of a full conversion
  input  logic [SW-1:0]        test_steps,  // length of a test-mode conversion
  output logic signed [VW-1:0] start_vref,
  output logic [SW-1:0]        start_step
);

  localparam logic signed [VW-1:0] MID = VW'(1) <<< (N_BITS - 1);

  logic [SW-1:0] t_eff;

  always_comb begin
    t_eff = (test_steps == '0) ? SW'(1) : test_steps;
    if (t_eff > num_steps) t_eff = num_steps;
    if (test_mode) begin
      start_vref = test_vref;
      start_step = num_steps - t_eff;
    end else begin
      start_vref = MID;
      start_step = '0;
    end
  end

endmodule
