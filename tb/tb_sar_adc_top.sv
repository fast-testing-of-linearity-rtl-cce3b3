// tb_sar_adc_top: end-to-end test of the SAR ADC at its default size
// (10 bits, 16-step limit, 1024-entry test RAM, ideal analog models).
//   1. Normal mode, binary weights, 10 steps: every code 0..1023, each with
//      input c + 0.5 LSB; the result must be c, 12 cycles start-to-eoc.
//   2. Linearity test mode: the test RAM holds, per code, a preset within
//      -7..+8 LSB of the code (a device with that much INL); the controller
//      walks a staircase input over all 1024 codes with 4 steps per point;
//      every result must be right, at 8 cycles per point against 14 in
//      normal mode. Points whose preset is too far away (INL beyond the
//      window) must give a wrong code, which is what the test detects.
//   3. Redundant 12-step weights: every code converts correctly.
//   4. Error injection through the MUX4 at step 1 (invert, force 0, force 1)
//      near the step-1 reference: the redundant search still gives the right
//      code; with binary weights an inverted decision gives a wrong code.
// Each mechanism is counted and a mechanism that never happened is a failure.
`timescale 1ns / 1ps
module tb_sar_adc_top;
  import sar_pkg::*;
  localparam int N = 10, M = 16, DEPTH = 1024;
  localparam int VW = N + 2, SW = $clog2(M + 1), WAW = $clog2(M), TAW = $clog2(DEPTH);

  logic                 clk = 0, rst_n = 0;
  real                  vin = 0.0;
  logic                 test_mode = 0, w_we = 0, t_we = 0, run = 0;
  logic [SW-1:0]        num_steps = SW'(10), test_steps = SW'(4);
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

  // error injection programme of the test equipment
  int       inj_step = -1;
  err_sel_e inj_code = SEL_NORMAL;
  assign err_sel = (step_en && int'(step) == inj_step) ? inj_code : SEL_NORMAL;

  int checks = 0, failures = 0;
  int n_normal = 0, n_test = 0, n_window = 0, n_redundant = 0;
  int n_invert = 0, n_force0 = 0, n_force1 = 0, n_binary_err = 0;
  longint cyc = 0;
  int preset_off [DEPTH];

  sar_adc_top dut (
    .clk, .rst_n, .vin, .test_mode, .num_steps, .test_steps,
    .w_we, .w_addr, .w_data, .t_we, .t_addr, .t_data,
    .run, .start_addr, .end_addr, .active, .done,
    .err_sel, .sample, .step_en, .step,
    .eoc, .result_valid, .result_addr, .dout, .decisions, .dac_code);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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
    for (int j = 0; j < w.size(); j++) begin
      @(negedge clk);
      w_we = 1; w_addr = WAW'(j); w_data = N'(w[j]);
    end
    @(negedge clk);
    w_we = 0;
    num_steps = SW'(m);
  endtask

  // one conversion through the controller; returns code and cycles start->eoc
  task automatic convert_one(input real v, output int code, output int lat);
    longint t0;
    vin = v;
    @(negedge clk);
    start_addr = '0; end_addr = '0; run = 1;
    @(negedge clk);
    run = 0;
    while (!eoc) @(negedge clk);
    lat = 0;
    while (!result_valid) @(negedge clk);
    code = int'(dout);
    @(negedge clk);
  endtask

  // latency: edges from the one that takes the start pulse (the sample
  // phase begins after it) to the one that makes eoc high
  longint t_start, t_eoc;
  logic   sample_q = 0;
  always @(posedge clk) begin
    if (sample && !sample_q) t_start = cyc - 1;
    sample_q = sample;
    if (eoc) t_eoc = cyc - 1;
    cyc++;
  end

  initial begin
    int code, lat;
    int wbin [] = '{256, 128, 64, 32, 16, 8, 4, 2, 1};
    int wred [] = '{192, 128, 80, 48, 32, 16, 10, 6, 4, 2, 1};
    longint t_run0, cyc_test, cyc_norm;

    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. normal binary conversions
    load_weights(wbin, 10);
    t_run0 = cyc;
    for (int c = 0; c < 1024; c++) begin
      convert_one(c + 0.5, code, lat);
      check(code == c, $sformatf("normal binary: code %0d expected %0d", code, c));
      check(t_eoc - t_start == 12, $sformatf("normal latency %0d", t_eoc - t_start));
      n_normal++;
    end

    // normal mode as one controller run: per-point cost
    vin = 300.5;
    @(negedge clk);
    start_addr = TAW'(0); end_addr = TAW'(63); run = 1;
    t_run0 = cyc;
    @(negedge clk);
    run = 0;
    while (!done) @(negedge clk);
    cyc_norm = cyc - t_run0;

    // 2. linearity test mode over a staircase
    for (int a = 0; a < DEPTH; a++) begin
      preset_off[a] = int'($urandom_range(0, 15)) - 7;   // -7 .. +8
      if (a % 97 == 5) preset_off[a] = (a % 2) ? 12 : -11;  // outside the window
      @(negedge clk);
      t_we = 1; t_addr = TAW'(a); t_data = VW'(a + preset_off[a]);
    end
    @(negedge clk);
    t_we = 0;
    test_mode = 1;
    vin = 0.5;
    start_addr = TAW'(0); end_addr = TAW'(DEPTH - 1); run = 1;
    t_run0 = cyc;
    @(negedge clk);
    run = 0;
    begin
      int n = 0;
      forever begin
        if (result_valid) begin
          int a;
          bit in_win;
          a = int'(result_addr);
          in_win = (preset_off[a] >= -7 && preset_off[a] <= 8);
          if (in_win && !(a < 8 || a > DEPTH - 9)) begin
            check(int'(dout) == a, $sformatf("test mode: code %0d at point %0d", dout, a));
            n_test++;
          end else if (!in_win) begin
            check(int'(dout) != a, $sformatf("preset outside window not detected at %0d", a));
            n_window++;
          end
          check(t_eoc - t_start == 6, $sformatf("test latency %0d", t_eoc - t_start));
          vin = a + 1.5;   // staircase: next step
          n++;
        end
        if (done) break;
        @(negedge clk);
      end
      check(n == DEPTH, $sformatf("%0d test points converted", n));
    end
    cyc_test = cyc - t_run0;
    check(cyc_test <= DEPTH * 8 + 4, $sformatf("test run took %0d cycles", cyc_test));
    $display("cycles per point: normal %0d, linearity test mode %0d",
             cyc_norm / 64, cyc_test / DEPTH);
    check(cyc_norm / 64 == 14 && cyc_test / DEPTH == 8, "per-point cycle counts 14 and 8");
    test_mode = 0;

    // 3. redundant search
    load_weights(wred, 12);
    for (int c = 0; c < 1024; c++) begin
      convert_one(c + 0.5, code, lat);
      check(code == c, $sformatf("redundant: code %0d expected %0d", code, c));
      check(t_eoc - t_start == 14, $sformatf("redundant latency %0d", t_eoc - t_start));
      n_redundant++;
    end

    // 4. error injection at step 1 near the step-1 reference (704 or 320)
    inj_step = 1;
    for (int dlt = -60; dlt <= 60; dlt += 3) begin
      bit ideal_d1;
      int c;
      c = 704 + dlt;
      ideal_d1 = (c + 0.5 > 704.0);
      inj_code = SEL_INVERT;
      convert_one(c + 0.5, code, lat);
      check(code == c && decisions[1] == !ideal_d1, $sformatf("inverted step 1 at %0d: %0d", c, code));
      n_invert++;
      inj_code = SEL_FORCE0;
      convert_one(c + 0.5, code, lat);
      check(code == c && decisions[1] == 1'b0, $sformatf("forced 0 at %0d: %0d", c, code));
      n_force0++;
      c = 320 + dlt;
      inj_code = SEL_FORCE1;
      convert_one(c + 0.5, code, lat);
      check(code == c && decisions[1] == 1'b1, $sformatf("forced 1 at %0d: %0d", c, code));
      n_force1++;
    end
    // the binary search has no redundancy: an inverted decision shows
    load_weights(wbin, 10);
    inj_code = SEL_INVERT;
    for (int dlt = -40; dlt <= 40; dlt += 20) begin
      convert_one(768 + dlt + 0.5, code, lat);
      check(code != 768 + dlt, $sformatf("binary search hid an error at %0d", 768 + dlt));
      n_binary_err++;
    end
    inj_step = -1;

    $display("normal %0d, test-mode %0d, out-of-window %0d, redundant %0d, invert %0d, force0 %0d, force1 %0d, binary-error %0d",
             n_normal, n_test, n_window, n_redundant, n_invert, n_force0, n_force1, n_binary_err);
    check(n_normal > 0 && n_test > 0 && n_window > 0 && n_redundant > 0, "conversion mechanisms seen");
    check(n_invert > 0 && n_force0 > 0 && n_force1 > 0 && n_binary_err > 0, "injection mechanisms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
