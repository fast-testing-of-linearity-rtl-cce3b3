// sar_logic: successive-approximation register with programmable weights.
//
// It holds the DAC reference code Vref and updates it once per comparison
// step with the decision d of that step:
//   Vref(j+1) = Vref(j) + w[j]   if d(j) = 1   (Vin above the reference)
//   Vref(j+1) = Vref(j) - w[j]   if d(j) = 0
// where w[j] comes from the weight RAM at address 'step'. At the last step
// the output code is formed as Dout = Vref if d = 1 and Vref - 1 if d = 0,
// the final term (s(M)-1)/2 of the published output equation; with binary
// weights this is the ordinary binary search, with redundant weights the
// generalized non-binary search. 'load' (end of the sample phase) sets Vref
// to the start value chosen by the preset multiplexer: mid-scale normally, a
// preset level in linearity-test mode. Dout is saturated to 0 .. 2^N-1, since
// a redundant search can end just outside the code range; the saturation and
// the per-step decision record 'decisions' (bit j = decision of step j, for
// the test equipment) are this design's choices. Timing: Vref and Dout change
// on the clock edge that ends a step; Dout is valid when the timing
// generator's eoc is high and stays until the next conversion ends.
`timescale 1ns / 1ps
module sar_logic #(
  parameter int unsigned N_BITS    = sar_pkg::N_BITS_DEF,
  parameter int unsigned MAX_STEPS = sar_pkg::MAX_STEPS_DEF,
  localparam int unsigned VW = N_BITS + 2,
  localparam int unsigned AW = $clog2(MAX_STEPS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic signed [VW-1:0] start_vref,
  input  logic                 step_en,
  input  logic [AW-1:0]        step,
  input  logic                 last,
  input  logic                 d,          // decision after the error-injection mux
  input  logic [N_BITS-1:0]    weight,     // w[step] from the weight RAM
  output logic signed [VW-1:0] vref,       // to the DAC
  output logic [N_BITS-1:0]    dout,
  output logic [MAX_STEPS-1:0] decisions
);

  localparam logic signed [VW-1:0] MID  = VW'(1) <<< (N_BITS - 1);
  localparam logic signed [VW-1:0] FULL = (VW'(1) <<< N_BITS) - VW'(1);

  logic signed [VW-1:0] w_s, final_code;

  assign w_s        = VW'(weight);
  assign final_code = d ? vref : vref - VW'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vref      <= MID;
      dout      <= '0;
      decisions <= '0;
    end else if (load) begin
      vref      <= start_vref;
      decisions <= '0;
    end else if (step_en) begin
      decisions[step] <= d;
      if (last) begin
        if (final_code < 0)         dout <= '0;
        else if (final_code > FULL) dout <= '1;
        else                        dout <= N_BITS'(final_code);
      end else begin
        vref <= d ? vref + w_s : vref - w_s;
      end
    end
  end

endmodule
