// tb_sar_adc_5bit: the 5-bit examples of the design, on a 5-bit instance of
// the converter (8-step limit, 32-entry test RAM).
//   - binary search, 5 steps, weights 8 4 2 1: every code;
//   - redundant search, 6 steps, weights 10 6 3 2 1 (the radix 2^(5/6)
//     weights 10.1 5.7 3.2 1.8 1 rounded): every code, and a decision
//     inverted at step 0 (inputs 13..18) or step 1 (inputs 5, 6, 25, 26)
//     is corrected;
//   - linearity test mode, 2 steps instead of 5, over a staircase of all 32
//     codes, presets up to 2 below or 1 above the code.
`timescale 1ns / 1ps
module tb_sar_adc_5bit;
  import sar_pkg::*;
  localparam int N = 5, M = 8, DEPTH = 32;
  localparam int VW = N + 2, SW = $clog2(M + 1), WAW = $clog2(M), TAW = $clog2(DEPTH);

  logic                 clk = 0, rst_n = 0;
  real                  vin = 0.0;
  logic                 test_mode = 0, w_we = 0, t_we = 0, run = 0;
  logic [SW-1:0]        num_steps = SW'(5), test_steps = SW'(2);
  logic [WAW-1:0]       w_addr = '0;
  logic [N-1:0]         w_data = '0;
  logic [TAW-1:0]       t_addr = '0, start_addr = '0, end_addr = '0;
  logic signed [VW-1:0] t_data = '0;
  logic [2:0]           err_sel;
  logic                 active, done, sample, step_en, eoc, result_valid;
  logic [WAW-1:0]       step;
  logic [TAW-1:0]       result_addr;
  logic [N-1:0]         dout;
  logic [M-1:0]         decisions;
  logic signed [VW-1:0] dac_code;
  int       inj_step = -1;
  int checks = 0, failures = 0, n_bin = 0, n_red = 0, n_inj = 0, n_test = 0;

  assign err_sel = (step_en && int'(step) == inj_step) ? SEL_INVERT : SEL_NORMAL;

  sar_adc_top #(.N_BITS(N), .MAX_STEPS(M), .TEST_DEPTH(DEPTH)) dut (
    .clk, .rst_n, .vin, .test_mode, .num_steps, .test_steps,
    .w_we, .w_addr, .w_data, .t_we, .t_addr, .t_data,
    .run, .start_addr, .end_addr, .active, .done,
    .err_sel, .sample, .step_en, .step,
    .eoc, .result_valid, .result_addr, .dout, .decisions, .dac_code);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic load_weights(input int w [], input int m);
    foreach (w[j]) begin
      @(negedge clk);
      w_we = 1; w_addr = WAW'(j); w_data = N'(w[j]);
    end
    @(negedge clk);
    w_we = 0;
    num_steps = SW'(m);
  endtask

  task automatic convert_one(input real v, output int code);
    vin = v;
    @(negedge clk);
    start_addr = '0; end_addr = '0; run = 1;
    @(negedge clk);
    run = 0;
    while (!result_valid) @(negedge clk);
    code = int'(dout);
    @(negedge clk);
  endtask

  initial begin
    int code;
    int inj1 [] = '{5, 6, 25, 26};
    int wbin [] = '{8, 4, 2, 1};
    int wred [] = '{10, 6, 3, 2, 1};
    repeat (3) @(negedge clk);
    rst_n = 1;

    load_weights(wbin, 5);
    for (int c = 0; c < 32; c++) begin
      convert_one(c + 0.5, code);
      check(code == c, $sformatf("5-step binary: %0d expected %0d", code, c));
      n_bin++;
    end

    // 2-step linearity test over a staircase
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      t_we = 1; t_addr = TAW'(a); t_data = VW'(a + int'($urandom_range(0, 3)) - 1);
    end
    @(negedge clk);
    t_we = 0;
    test_mode = 1;
    vin = 0.5;
    start_addr = '0; end_addr = TAW'(DEPTH - 1); run = 1;
    @(negedge clk);
    run = 0;
    forever begin
      if (result_valid) begin
        int a;
        a = int'(result_addr);
        check(int'(dout) == int'(result_addr), $sformatf("2-step test: %0d at point %0d", dout, result_addr));
        check(decisions[2:0] == 3'b000, "steps before the preset are skipped");
        n_test++;
        vin = a + 1.5;
      end
      if (done) break;
      @(negedge clk);
    end
    test_mode = 0;

    load_weights(wred, 6);
    for (int c = 0; c < 32; c++) begin
      convert_one(c + 0.5, code);
      check(code == c, $sformatf("6-step redundant: %0d expected %0d", code, c));
      n_red++;
    end
    inj_step = 0;
    for (int c = 13; c <= 18; c++) begin
      convert_one(c + 0.5, code);
      check(code == c, $sformatf("error at step 0 not corrected at %0d", c));
      n_inj++;
    end
    inj_step = 1;
    foreach (inj1[i]) begin
      convert_one(inj1[i] + 0.5, code);
      check(code == inj1[i], $sformatf("error at step 1 not corrected at %0d", inj1[i]));
      n_inj++;
    end
    inj_step = -1;

    check(n_bin == 32 && n_test == 32 && n_red == 32 && n_inj == 10, "all mechanisms seen");
    $display("binary %0d, 2-step test %0d, redundant %0d, corrected errors %0d", n_bin, n_test, n_red, n_inj);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
