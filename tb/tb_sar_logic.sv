// tb_sar_logic: drives the SAR logic as the timing generator would and closes
// the loop with an ideal comparator in the testbench (d = Vin > Vref, with
// Vin = c + 0.5 for output code c). Every code is converted with the 10-step
// binary weights and with a redundant 12-step weight set; in linearity test
// mode the reference is preset near the code and only the last 4 steps run;
// decision errors are injected at step 1 near the step-1 reference and
// must be corrected by the redundancy; forcing all decisions low or high
// checks the output saturation. The expected code is always c, which the
// testbench knows independently of the search; the 'decisions' record is
// compared with the decisions the testbench applied.
`timescale 1ns / 1ps
module tb_sar_logic;
  localparam int N = 10, M = 16, VW = N + 2, AW = $clog2(M);

  logic                 clk = 0, rst_n = 0, load = 0, step_en = 0, last = 0, d = 0;
  logic signed [VW-1:0] start_vref = '0, vref;
  logic [AW-1:0]        step = '0;
  logic [N-1:0]         weight = '0, dout;
  logic [M-1:0]         decisions, applied;
  int                   w [M];
  int checks = 0, failures = 0;

  sar_logic #(.N_BITS(N), .MAX_STEPS(M)) dut (
    .clk, .rst_n, .load, .start_vref, .step_en, .step, .last, .d, .weight,
    .vref, .dout, .decisions);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_binary();
    for (int j = 0; j < M; j++) w[j] = (j <= N - 2) ? (1 << (N - 2 - j)) : 0;
  endtask

  task automatic set_redundant();
    int r [11] = '{192, 128, 80, 48, 32, 16, 10, 6, 4, 2, 1};
    for (int j = 0; j < M; j++) w[j] = (j < 11) ? r[j] : 0;
  endtask

  // mode: 0 normal, 1 invert at err_step, 2 force 0 at err_step,
  // 3 force 1 at err_step, 4 force every decision 0, 5 force every decision 1
  task automatic convert(input real vin, input int m, input int j0, input int pre,
                         input int mode, input int err_step, output int code);
    @(negedge clk);
    load = 1; start_vref = VW'(pre);
    @(negedge clk);
    load = 0;
    applied = '0;
    for (int j = j0; j < m; j++) begin
      logic dd;
      dd = (vin > real'(vref));
      if (mode == 1 && j == err_step) dd = ~dd;
      if (mode == 2 && j == err_step) dd = 1'b0;
      if (mode == 3 && j == err_step) dd = 1'b1;
      if (mode == 4) dd = 1'b0;
      if (mode == 5) dd = 1'b1;
      applied[j] = dd;
      step_en = 1; step = AW'(j); last = (j == m - 1); d = dd; weight = N'(w[j]);
      @(negedge clk);
    end
    step_en = 0; last = 0;
    code = int'(dout);
    checks++;
    if (decisions !== applied) begin
      failures++;
      $display("FAIL decision record %b expected %b", decisions, applied);
    end
  endtask

  task automatic expect_code(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: code %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int code, ok_inv;
    repeat (2) @(negedge clk);
    rst_n = 1;

    set_binary();
    for (int c = 0; c < 1024; c++) begin
      convert(c + 0.5, 10, 0, 512, 0, 0, code);
      expect_code(code, c, "binary");
    end
    // linearity test mode: preset P, last 4 steps, reaches P-8 .. P+7
    for (int i = 0; i < 2000; i++) begin
      int c, p;
      c = int'($urandom_range(8, 1015));
      p = c + int'($urandom_range(0, 15)) - 7;
      convert(c + 0.5, 10, 6, p, 0, 0, code);
      expect_code(code, c, "binary 4-step test mode");
    end

    set_redundant();
    for (int c = 0; c < 1024; c++) begin
      convert(c + 0.5, 12, 0, 512, 0, 0, code);
      expect_code(code, c, "redundant");
    end
    // wrong decisions at step 1 within the redundancy margin are corrected
    ok_inv = 0;
    for (int dlt = -60; dlt <= 60; dlt++) begin
      for (int md = 1; md <= 3; md++) begin
        convert(704 + dlt + 0.5, 12, 0, 512, md, 1, code);
        expect_code(code, 704 + dlt, "redundant with injected error");
      end
      convert(320 + dlt + 0.5, 12, 0, 512, 1, 1, code);
      expect_code(code, 320 + dlt, "redundant with inverted step 1, lower half");
    end
    // the binary search cannot correct the same error
    set_binary();
    convert(700.5, 10, 0, 512, 1, 1, code);
    checks++;
    if (code == 700) begin
      failures++;
      $display("FAIL binary search corrected an injected error");
    end
    // saturation at both ends
    set_redundant();
    convert(0.5, 12, 0, 512, 4, 0, code);
    expect_code(code, 0, "saturation low");
    convert(1023.5, 12, 0, 512, 5, 0, code);
    expect_code(code, 1023, "saturation high");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
