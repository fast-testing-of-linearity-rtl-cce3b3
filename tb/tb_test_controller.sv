// tb_test_controller: the converter is replaced by a model that raises eoc
// LAT cycles after each start pulse (6 = a 4-step test point with a 2-cycle
// sample phase). Runs over several address ranges, including a single point
// and a range that wraps past the last address, check that every address
// from start to end is converted once and in order, that the RAM read and the
// start pulse come together with the right address, that each result carries
// its address, that 'done' pulses once at the end, and that a test point
// takes LAT + 2 cycles.
`timescale 1ns / 1ps
module tb_test_controller;
  localparam int DEPTH = 1024, AW = $clog2(DEPTH), LAT = 6;

  logic          clk = 0, rst_n = 0, run = 0, eoc = 0;
  logic [AW-1:0] start_addr = '0, end_addr = '0, addr, result_addr;
  logic          ram_ren, conv_start, active, result_valid, done;
  int            cnt = -1;
  int checks = 0, failures = 0;

  test_controller #(.DEPTH(DEPTH)) dut (
    .clk, .rst_n, .run, .start_addr, .end_addr, .eoc, .ram_ren, .addr,
    .conv_start, .active, .result_valid, .result_addr, .done);

  always #5 clk = ~clk;

  // converter model
  always_ff @(posedge clk) begin
    eoc <= 1'b0;
    if (conv_start) cnt <= 1;
    else if (cnt > 0) begin
      if (cnt == LAT) begin
        eoc <= 1'b1;
        cnt <= -1;
      end else cnt <= cnt + 1;
    end
  end

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

  task automatic run_range(input int a0, input int a1);
    int npts, exp_a, nres, ndone, cyc, last_start;
    npts = ((a1 - a0 + DEPTH) % DEPTH) + 1;
    @(negedge clk);
    start_addr = AW'(a0); end_addr = AW'(a1); run = 1;
    @(negedge clk);
    run = 0;
    start_addr = '0; end_addr = '0;   // latched at run
    exp_a = a0; nres = 0; ndone = 0; cyc = 0; last_start = -1;
    while (ndone == 0 && cyc < 20 * npts + 20) begin
      if (result_valid) begin
        check(int'(result_addr) == exp_a, $sformatf("result addr %0d expected %0d", result_addr, exp_a));
        nres++;
        exp_a = (exp_a + 1) % DEPTH;
      end
      if (conv_start) begin
        check(ram_ren, "RAM read with start");
        check(int'(addr) == exp_a, $sformatf("start addr %0d expected %0d", addr, exp_a));
        if (last_start >= 0)
          check(cyc - last_start == LAT + 2, $sformatf("point period %0d", cyc - last_start));
        last_start = cyc;
      end
      if (done) ndone++;
      @(negedge clk);
      cyc++;
    end
    check(nres == npts, $sformatf("%0d results for %0d points", nres, npts));
    check(ndone == 1 && !active, "done once, idle after");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!active && !conv_start, "idle after reset");
    run_range(0, 15);
    run_range(100, 100);
    run_range(1020, 3);
    run_range(500, 563);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
