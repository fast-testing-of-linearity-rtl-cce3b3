// sar_digital: the synthesizable part of the SAR ADC: test controller,
// test-mode RAM, preset multiplexer, timing generator, weight RAM,
// comparator-error MUX4 and SAR logic, wired as in sar_adc_top, which adds
// the analog models (sample-and-hold, comparator, DAC) around it.
//
// Ports are those of sar_adc_top, except that the analog input is replaced by
// the comparator decision comp_raw and dac_code is the code that drives the
// DAC. comp_raw is sampled on the rising clock edge that ends each step; the
// DAC code changes on that same edge. See sar_adc_top for the operation and
// timing.
`timescale 1ns / 1ps
module sar_digital #(
  parameter int unsigned N_BITS     = sar_pkg::N_BITS_DEF,
  parameter int unsigned MAX_STEPS  = sar_pkg::MAX_STEPS_DEF,
  parameter int unsigned TEST_DEPTH = sar_pkg::TEST_DEPTH_DEF,
  parameter int unsigned SAMPLE_CYC = sar_pkg::SAMPLE_CYC_DEF,
  localparam int unsigned VW  = N_BITS + 2,
  localparam int unsigned SW  = $clog2(MAX_STEPS + 1),
  localparam int unsigned WAW = $clog2(MAX_STEPS),
  localparam int unsigned TAW = $clog2(TEST_DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 comp_raw,     // comparator decision
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

  import sar_pkg::*;

  // control
  logic                 conv_start, ram_ren, load, last, busy;
  logic [TAW-1:0]       ram_addr;
  logic signed [VW-1:0] preset_vref, start_vref;
  logic [SW-1:0]        start_step;
  logic [N_BITS-1:0]    weight;
  logic                 d;

  test_controller #(.DEPTH(TEST_DEPTH)) u_ctl (
    .clk, .rst_n, .run, .start_addr, .end_addr, .eoc,
    .ram_ren, .addr(ram_addr), .conv_start, .active,
    .result_valid, .result_addr, .done
  );

  test_vref_ram #(.N_BITS(N_BITS), .DEPTH(TEST_DEPTH)) u_tram (
    .clk, .we(t_we), .waddr(t_addr), .wdata(t_data),
    .ren(ram_ren), .raddr(ram_addr), .rdata(preset_vref)
  );

  vref_preset_mux #(.N_BITS(N_BITS), .MAX_STEPS(MAX_STEPS)) u_pmux (
    .test_mode, .test_vref(preset_vref), .num_steps, .test_steps,
    .start_vref, .start_step
  );

  timing_gen #(.MAX_STEPS(MAX_STEPS), .SAMPLE_CYC(SAMPLE_CYC)) u_tgen (
    .clk, .rst_n, .start(conv_start), .start_step, .num_steps,
    .busy, .sample, .load, .step_en, .step, .last, .eoc
  );

  weight_ram #(.N_BITS(N_BITS), .MAX_STEPS(MAX_STEPS)) u_wram (
    .clk, .we(w_we), .waddr(w_addr), .wdata(w_data),
    .raddr(step), .rdata(weight)
  );

  comp_err_mux u_mux4 (.comp_in(comp_raw), .sel(err_sel_e'(err_sel)), .d_out(d));

  sar_logic #(.N_BITS(N_BITS), .MAX_STEPS(MAX_STEPS)) u_sar (
    .clk, .rst_n, .load, .start_vref, .step_en, .step, .last, .d, .weight,
    .vref(dac_code), .dout, .decisions
  );

  // The controller issues a start only while the converter is idle.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    conv_start |-> !busy);

endmodule
