// tb_cap_dac: the ideal DAC must equal the code at once. The settling DAC
// (T_DEC = 1 ns, TAU = 2 ns) must hold its old value during the decode delay
// and then follow v_new + (v_old - v_new) * exp(-(t - T_DEC) / TAU), checked
// at several instants after each code step within the model's 0.05 ns update
// grid, and end settled.
`timescale 1ns / 1ps
module tb_cap_dac;
  localparam int N = 10, VW = N + 2;
  localparam real TDEC = 1.0, TAU = 2.0;

  logic signed [VW-1:0] code = VW'(512);
  real  v_ideal, v_slow;
  int checks = 0, failures = 0;

  cap_dac #(.N_BITS(N))                           dut_i (.code, .vout(v_ideal));
  cap_dac #(.N_BITS(N), .T_DEC(TDEC), .TAU(TAU))  dut_s (.code, .vout(v_slow));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic near(input real got, input real exp, input real tol, input string what);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL %s: %f expected %f (t=%0t)", what, got, exp, $time);
    end
  endtask

  initial begin
    int old_c, new_c;
    real expv, slope;
    #50;
    old_c = 512;
    for (int i = 0; i < 50; i++) begin
      new_c = $urandom_range(0, 1023);
      code  = VW'(new_c);
      #0.01;
      near(v_ideal, real'(new_c), 1e-9, "ideal");
      near(v_slow, real'(old_c), 1e-3, "held during decode");
      for (int k = 1; k <= 6; k++) begin
        #(1.0);
        expv  = new_c + (old_c - new_c) * $exp(-(k + 0.01 - TDEC) / TAU);
        slope = (old_c > new_c ? old_c - new_c : new_c - old_c) / TAU;
        if (k * 1.0 + 0.01 > TDEC)
          near(v_slow, expv, slope * 0.06 + 1e-6, $sformatf("settling at %0d ns", k));
      end
      #40;
      near(v_slow, real'(new_c), 1e-3, "settled");
      old_c = new_c;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
