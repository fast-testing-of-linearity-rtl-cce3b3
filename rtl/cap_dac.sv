// cap_dac: behavioural model of the capacitor-array DAC (analog; not
// synthesizable logic).
//
// It turns the SAR reference code into the reference voltage, in LSB units
// (vout = code * VLSB). With T_DEC = 0 and TAU = 0 it is ideal and follows
// the code at once. Otherwise it models the settling used by the speed test
// of a non-binary SAR ADC: after a code change the input decoding takes
// T_DEC, then the output moves towards the new value as a first-order system
// with time constant TAU = R*C (switch on-resistance times unit capacitor):
//   vout(t) = v_new + (v_old - v_new) * exp(-(t - t_change - T_DEC) / TAU)
// and it is recomputed every T_STEP. A comparison made before the output has
// settled can then be wrong, which is what that test looks for. Times are in
// ns. The first-order model follows the published description; the
// parameter values are free.
`timescale 1ns / 1ps
module cap_dac #(
  parameter int unsigned N_BITS = sar_pkg::N_BITS_DEF,
  parameter real VLSB   = 1.0,
  parameter real T_DEC  = 0.0,
  parameter real TAU    = 0.0,
  parameter real T_STEP = 0.05,
  localparam int unsigned VW = N_BITS + 2
) (
  input  logic signed [VW-1:0] code,
  output real                  vout
);

  if (T_DEC == 0.0 && TAU == 0.0) begin : g_ideal
    assign vout = $itor(code) * VLSB;
  end else begin : g_settle
    real     v_old, v_new, v_now, dt;
    realtime t_chg;

    initial begin
      v_now = $itor(code) * VLSB;
      v_old = v_now;
      v_new = v_now;
      t_chg = 0.0;
    end

    always @(code) begin
      v_old = v_now;
      v_new = $itor(code) * VLSB;
      t_chg = $realtime;
    end

    initial begin
      forever begin
        #(T_STEP);
        dt = $realtime - t_chg - T_DEC;
        if (dt <= 0.0)      v_now = v_old;
        else if (TAU > 0.0) v_now = v_new + (v_old - v_new) * $exp(-dt / TAU);
        else                v_now = v_new;
      end
    end

    assign vout = v_now;
  end

endmodule
