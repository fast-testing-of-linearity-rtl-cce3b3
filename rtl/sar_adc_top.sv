// sar_adc_top: SAR ADC with built-in support for fast DC-linearity testing
// and for testing the comparator-error tolerance of a non-binary search.
//
// Signal path: sample-and-hold -> comparator -> error-injection MUX4 ->
// SAR logic -> capacitor DAC -> back to the comparator. The timing generator
// runs the sample phase and one comparison step per clock. The SAR logic
// moves the reference by per-step weights from the weight RAM, so the same
// converter runs a 10-step binary search or a longer redundant search.
//
// Linearity test mode (test_mode = 1): the test controller walks the
// test-mode RAM from start_addr to end_addr; for each test point the preset
// multiplexer starts the SAR at the stored reference and at step
// num_steps - test_steps, so only the last few comparisons are made around
// the known staircase input (4 instead of 10 in the published example).
// Normal mode (test_mode = 0): each conversion starts at mid-scale and
// step 0; start_addr = end_addr gives one conversion.
//
// Error-tolerance test: err_sel drives the MUX4 during every step; the test
// equipment watches 'step' and, at the step it wants, inverts or forces the
// decision, then checks that the result is still right.
//
// Interface: weights and presets are written through w_* and t_*; num_steps
// and test_steps must stay stable during a run. Results come with
// result_valid, result_addr and dout; 'decisions' holds the decision of each
// step of the last conversion. Analog signals are real numbers in LSB units.
// Timing: a conversion takes SAMPLE_CYC + steps cycles after its start pulse,
// one result every SAMPLE_CYC + steps + 2 cycles in a run.
// The analog parts are behavioural models; DAC_T_DEC and DAC_TAU (ns) model
// DAC decoding delay and RC settling and are 0 (ideal) by default. All the
// synthesizable logic sits in sar_digital, instantiated here.
// The block structure, the search equations, the test RAM with its preset
// multiplexer and controller, and the MUX4 follow the published test scheme;
// sizes, handshakes and phase lengths are this design's choices.
`timescale 1ns / 1ps
module sar_adc_top #(
  parameter int unsigned N_BITS     = sar_pkg::N_BITS_DEF,
  parameter int unsigned MAX_STEPS  = sar_pkg::MAX_STEPS_DEF,
  parameter int unsigned TEST_DEPTH = sar_pkg::TEST_DEPTH_DEF,
  parameter int unsigned SAMPLE_CYC = sar_pkg::SAMPLE_CYC_DEF,
  parameter real         CMP_OFFSET = 0.0,
  parameter real         DAC_T_DEC  = 0.0,
  parameter real         DAC_TAU    = 0.0,
  localparam int unsigned VW  = N_BITS + 2,
  localparam int unsigned SW  = $clog2(MAX_STEPS + 1),
  localparam int unsigned WAW = $clog2(MAX_STEPS),
  localparam int unsigned TAW = $clog2(TEST_DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  real                  vin,          // analog input, LSB units
  // configuration
  input  logic                 test_mode,
  input  logic [SW-1:0]        num_steps,
  input  logic [SW-1:0]        test_steps,
  // weight RAM write port
  input  logic                 w_we,
  input  logic [WAW-1:0]       w_addr,
  input  logic [N_BITS-1:0]    w_data,
  // test-mode RAM write port
  input  logic                 t_we,
  input  logic [TAW-1:0]       t_addr,
  input  logic signed [VW-1:0] t_data,
  // test controller
  input  logic                 run,
  input  logic [TAW-1:0]       start_addr,
  input  logic [TAW-1:0]       end_addr,
  output logic                 active,
  output logic                 done,
  // comparator-error injection
  input  logic [2:0]           err_sel,
  output logic                 sample,
  output logic                 step_en,
  output logic [WAW-1:0]       step,
  // results
  output logic                 eoc,
  output logic                 result_valid,
  output logic [TAW-1:0]       result_addr,
  output logic [N_BITS-1:0]    dout,
  output logic [MAX_STEPS-1:0] decisions,
  output logic signed [VW-1:0] dac_code
);

  real  vhold, vdac;
  logic comp_raw;

  sample_hold u_sh (.sample, .vin, .vhold);

  comparator #(.OFFSET(CMP_OFFSET)) u_cmp (.vp(vhold), .vn(vdac), .out(comp_raw));

  cap_dac #(.N_BITS(N_BITS), .T_DEC(DAC_T_DEC), .TAU(DAC_TAU)) u_dac (
    .code(dac_code), .vout(vdac)
  );

  sar_digital #(
    .N_BITS(N_BITS), .MAX_STEPS(MAX_STEPS), .TEST_DEPTH(TEST_DEPTH), .SAMPLE_CYC(SAMPLE_CYC)
  ) u_dig (
    .clk, .rst_n, .comp_raw, .test_mode, .num_steps, .test_steps,
    .w_we, .w_addr, .w_data, .t_we, .t_addr, .t_data,
    .run, .start_addr, .end_addr, .active, .done,
    .err_sel, .sample, .step_en, .step,
    .eoc, .result_valid, .result_addr, .dout, .decisions, .dac_code
  );

endmodule
