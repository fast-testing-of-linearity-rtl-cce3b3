// timing_gen: timing generator of the SAR ADC.
//
// One conversion is a sample phase followed by a run of comparison steps.
// A start pulse in IDLE latches the step range and begins SAMPLE_CYC cycles
// with 'sample' high (the sample-and-hold tracks the input). In the last
// sample cycle 'load' tells the SAR logic to take its start reference. Then
// one comparison step per clock: 'step_en' is high, 'step' counts from
// start_step up to num_steps-1 and 'last' marks the final step. The cycle
// after the last step 'eoc' pulses for one cycle.
//   latency, start edge to eoc high: SAMPLE_CYC + (num_steps - start_step) cycles
// Normal binary 10-bit conversion: 2 + 10 = 12 cycles; a 4-step linearity
// test point: 2 + 4 = 6 cycles. The block's role follows the published SAR
// configuration; the phase lengths and the one-step-per-clock timing are this
// design's choices. A start while busy is ignored. num_steps = 0 is run as a
// one-step conversion.
`timescale 1ns / 1ps
module timing_gen #(
  parameter int unsigned MAX_STEPS  = sar_pkg::MAX_STEPS_DEF,
  parameter int unsigned SAMPLE_CYC = sar_pkg::SAMPLE_CYC_DEF,
  localparam int unsigned SW = $clog2(MAX_STEPS + 1),
  localparam int unsigned AW = $clog2(MAX_STEPS),
  localparam int unsigned CW = (SAMPLE_CYC > 1) ? $clog2(SAMPLE_CYC) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [SW-1:0] start_step,
  input  logic [SW-1:0] num_steps,
  output logic          busy,
  output logic          sample,
  output logic          load,
  output logic          step_en,
  output logic [AW-1:0] step,
  output logic          last,
  output logic          eoc
);

  typedef enum logic [1:0] {S_IDLE, S_SAMPLE, S_CONV} state_e;

  state_e        state;
  logic [CW-1:0] scnt;
  logic [SW-1:0] last_idx;   // num_steps - 1, latched at start

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      scnt     <= '0;
      step     <= '0;
      last_idx <= '0;
      eoc      <= 1'b0;
    end else begin
      eoc <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state    <= S_SAMPLE;
          scnt     <= '0;
          last_idx <= (num_steps == '0) ? '0 : num_steps - SW'(1);
          step     <= (start_step >= num_steps) ? AW'((num_steps == '0) ? '0 : num_steps - SW'(1))
                                                : AW'(start_step);
        end
        S_SAMPLE: begin
          if (load) state <= S_CONV;
          else      scnt  <= scnt + CW'(1);
        end
        S_CONV: begin
          if (last) begin
            state <= S_IDLE;
            eoc   <= 1'b1;
          end else begin
            step <= step + AW'(1);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy    = (state != S_IDLE);
  assign sample  = (state == S_SAMPLE);
  assign load    = (state == S_SAMPLE) && (scnt == CW'(SAMPLE_CYC - 1));
  assign step_en = (state == S_CONV);
  assign last    = step_en && (SW'(step) == last_idx);

  // The step counter never runs past the last step of the conversion.
  a_step_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    step_en |-> SW'(step) <= last_idx);

endmodule
