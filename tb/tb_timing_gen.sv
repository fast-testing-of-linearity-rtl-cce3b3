// tb_timing_gen: runs conversions of every length 1..MAX_STEPS from every
// start step, at the default 2-cycle sample phase, and checks cycle by cycle:
// 'sample' for exactly SAMPLE_CYC cycles with 'load' in the last of them,
// then one step per cycle from start_step to num_steps-1 with 'last' on the
// final one, then a one-cycle 'eoc'. The latency from the start edge to eoc
// must be SAMPLE_CYC + steps cycles (12 for a 10-step conversion, 6 for a
// 4-step test point). A start pulse while busy must be ignored.
`timescale 1ns / 1ps
module tb_timing_gen;
  localparam int M = 16, S = 2, SW = $clog2(M + 1), AW = $clog2(M);

  logic          clk = 0, rst_n = 0, start = 0;
  logic [SW-1:0] start_step = '0, num_steps = '0;
  logic          busy, sample, load, step_en, last, eoc;
  logic [AW-1:0] step;
  int checks = 0, failures = 0;

  timing_gen #(.MAX_STEPS(M), .SAMPLE_CYC(S)) dut (
    .clk, .rst_n, .start, .start_step, .num_steps,
    .busy, .sample, .load, .step_en, .step, .last, .eoc);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic convert(input int m, input int j0, input bit poke_busy);
    int cyc, k;
    @(negedge clk);
    num_steps = SW'(m); start_step = SW'(j0); start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;   // cycles since the start edge
    for (int i = 0; i < S; i++) begin
      check(sample && busy && !step_en, "sample phase");
      check(load == (i == S - 1), "load in last sample cycle");
      if (poke_busy && i == 0) start = 1;   // must be ignored
      @(negedge clk); cyc++;
      start = 0;
    end
    k = j0;
    while (step_en) begin
      check(int'(step) == k, $sformatf("step %0d expected %0d", step, k));
      check(last == (k == m - 1), "last flag");
      check(!sample && !eoc, "no sample or eoc while stepping");
      k++;
      @(negedge clk); cyc++;
    end
    check(k == m, $sformatf("ran to step %0d expected %0d", k, m));
    check(eoc && !busy, "eoc after last step");
    check(cyc - 1 == S + (m - j0), $sformatf("latency %0d expected %0d", cyc - 1, S + m - j0));
    @(negedge clk);
    check(!eoc && !busy, "eoc is one cycle, idle after");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(!busy && !eoc && !sample, "idle after reset");
    convert(10, 0, 0);    // normal 10-step binary conversion: 12 cycles
    convert(10, 6, 0);    // 4-step linearity test point: 6 cycles
    convert(12, 0, 1);    // start while busy is ignored
    for (int m = 1; m <= M; m++)
      for (int j0 = 0; j0 < m; j0++) convert(m, j0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
