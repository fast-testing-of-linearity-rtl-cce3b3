// tb_vref_preset_mux: checks the start reference and start step chosen by the
// preset multiplexer over all step counts and test lengths, in normal mode
// (mid-scale, step 0) and test mode (RAM value, step num_steps-test_steps,
// with test_steps clamped to 1 .. num_steps).
`timescale 1ns / 1ps
module tb_vref_preset_mux;
  localparam int N = 10, M = 16, VW = N + 2, SW = $clog2(M + 1);

  logic                 test_mode;
  logic signed [VW-1:0] test_vref, start_vref, exp_vref;
  logic [SW-1:0]        num_steps, test_steps, start_step;
  int                   exp_step, t;
  int checks = 0, failures = 0;

  vref_preset_mux #(.N_BITS(N), .MAX_STEPS(M)) dut (
    .test_mode, .test_vref, .num_steps, .test_steps, .start_vref, .start_step);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int tm = 0; tm < 2; tm++)
      for (int m = 1; m <= M; m++)
        for (int ts = 0; ts <= M; ts++) begin
          test_mode  = tm[0];
          num_steps  = SW'(m);
          test_steps = SW'(ts);
          test_vref  = VW'(int'($urandom_range(0, 1023)));
          #1;
          t = (ts == 0) ? 1 : ts;
          if (t > m) t = m;
          exp_vref = tm ? test_vref : VW'(512);
          exp_step = tm ? m - t : 0;
          checks++;
          if (start_vref !== exp_vref || int'(start_step) != exp_step) begin
            failures++;
            $display("FAIL tm=%0d m=%0d ts=%0d got vref=%0d step=%0d expected %0d %0d",
                     tm, m, ts, start_vref, start_step, exp_vref, exp_step);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
