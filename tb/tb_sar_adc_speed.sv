// tb_sar_adc_speed: DAC settling-speed test of the non-binary SAR ADC.
// The DAC model is given a decoding delay of 2 ns and an RC time constant of
// 2 ns, and the converter runs the redundant 12-step search. After step 0
// the DAC steps from 512 to 704; an input just below 704 is then compared
// against a reference that has not fully settled, so the step-1 decision
// comes out 1 instead of 0. For two clock periods the testbench sweeps the
// input downwards from 704 in 0.05 LSB steps and finds the largest distance
// r(P) that still gives the wrong decision: r(P) = 192 exp(-(P - T_DEC)/TAU).
// From r at P = 10 ns and 12 ns it estimates TAU and T_DEC, and checks them
// against the model's values. Every one of these conversions must still give
// the right code: the later steps correct the error.
`timescale 1ns / 1ps
module tb_sar_adc_speed;
  import sar_pkg::*;
  localparam int N = 10, M = 16, DEPTH = 1024;
  localparam int VW = N + 2, SW = $clog2(M + 1), WAW = $clog2(M), TAW = $clog2(DEPTH);
  localparam real TDEC = 2.0, TAU = 2.0;

  logic                 clk = 0, rst_n = 0;
  real                  vin = 0.0, half = 5.0;
  logic                 w_we = 0, run = 0;
  logic [SW-1:0]        num_steps = SW'(12);
  logic [WAW-1:0]       w_addr = '0;
  logic [N-1:0]         w_data = '0;
  logic                 active, done, sample, step_en, eoc, result_valid;
  logic [WAW-1:0]       step;
  logic [TAW-1:0]       result_addr;
  logic [N-1:0]         dout;
  logic [M-1:0]         decisions;
  logic signed [VW-1:0] dac_code;
  int checks = 0, failures = 0, n_settle_err = 0;

  sar_adc_top #(.DAC_T_DEC(TDEC), .DAC_TAU(TAU)) dut (
    .clk, .rst_n, .vin, .test_mode(1'b0), .num_steps, .test_steps(SW'(4)),
    .w_we, .w_addr, .w_data, .t_we(1'b0), .t_addr('0), .t_data('0),
    .run, .start_addr('0), .end_addr('0), .active, .done,
    .err_sel(3'd0), .sample, .step_en, .step,
    .eoc, .result_valid, .result_addr, .dout, .decisions, .dac_code);

  always #(half) clk = ~clk;

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic convert_one(input real v);
    vin = v;
    @(negedge clk);
    run = 1;
    @(negedge clk);
    run = 0;
    while (!result_valid) @(negedge clk);
    @(negedge clk);
  endtask

  // largest distance below 704 at which the step-1 decision is still wrong
  task automatic sweep(output real r);
    r = 0.0;
    for (int i = 1; i <= 200; i++) begin
      real x;
      x = 0.05 * i - 0.025;
      convert_one(704.0 - x);
      // inputs within 0.1 LSB of a code edge may still flip on the tiny
      // settling error left in the last steps: allow one code there
      if (x - $floor(x) > 0.1 && x - $floor(x) < 0.9)
        check(int'(dout) == 703 - int'($floor(x)), $sformatf("code %0d at input %f", dout, 704.0 - x));
      else
        check(int'(dout) - (703 - int'($floor(x))) inside {-1, 0, 1},
              $sformatf("code %0d at input %f", dout, 704.0 - x));
      if (decisions[1]) begin
        r = x;
        n_settle_err++;
      end
    end
  endtask

  initial begin
    int wred [] = '{192, 128, 80, 48, 32, 16, 10, 6, 4, 2, 1};
    real r10, r12, tau_est, tdec_est;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (wred[j]) begin
      @(negedge clk);
      w_we = 1; w_addr = WAW'(j); w_data = N'(wred[j]);
    end
    @(negedge clk);
    w_we = 0;

    half = 5.0;
    sweep(r10);
    half = 6.0;
    repeat (4) @(negedge clk);
    sweep(r12);
    tau_est  = 2.0 / $ln(r10 / r12);
    tdec_est = 10.0 - tau_est * $ln(192.0 / r10);
    $display("wrong step-1 decisions below 704: %f LSB at 10 ns, %f LSB at 12 ns", r10, r12);
    $display("estimated TAU %f ns, T_DEC %f ns (model %f, %f)", tau_est, tdec_est, TAU, TDEC);
    check(r10 > r12 && r12 > 0.0, "settling errors seen at both periods");
    check(tau_est > 0.85 * TAU && tau_est < 1.15 * TAU, "TAU estimate");
    check(tdec_est > TDEC - 0.5 && tdec_est < TDEC + 0.5, "T_DEC estimate");
    check(n_settle_err > 0, "settling error mechanism seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
