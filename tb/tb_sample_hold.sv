// tb_sample_hold: while 'sample' is high the output must follow a changing
// input; after 'sample' falls it must keep the last sampled value however the
// input moves, until the next sample phase.
`timescale 1ns / 1ps
module tb_sample_hold;
  logic sample = 0;
  real  vin = 0.0, vhold, held;
  int checks = 0, failures = 0;

  sample_hold dut (.sample, .vin, .vhold);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      sample = 1;
      for (int k = 0; k < 3; k++) begin
        vin = $urandom_range(0, 1023000) / 1000.0;
        #1;
        checks++;
        if (vhold != vin) begin
          failures++;
          $display("FAIL track: %f expected %f", vhold, vin);
        end
      end
      held = vin;
      sample = 0;
      for (int k = 0; k < 5; k++) begin
        #1;
        vin = $urandom_range(0, 1023000) / 1000.0;
        #1;
        checks++;
        if (vhold != held) begin
          failures++;
          $display("FAIL hold: %f expected %f", vhold, held);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
