// tb_comp_err_mux: exhaustive check of the comparator-error injection mux.
// Every select code 0..7 is applied with both comparator decisions and the
// output is compared with the expected function: pass (0 and unused codes),
// invert (1), force 0 (3), force 1 (4).
`timescale 1ns / 1ps
module tb_comp_err_mux;
  import sar_pkg::*;

  logic     comp_in, d_out, exp_d;
  err_sel_e sel;
  int checks = 0, failures = 0;

  comp_err_mux dut (.comp_in, .sel, .d_out);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++) begin
      for (int c = 0; c < 2; c++) begin
        sel     = err_sel_e'(s[2:0]);
        comp_in = c[0];
        #1;
        if (s == 1)      exp_d = ~c[0];
        else if (s == 3) exp_d = 1'b0;
        else if (s == 4) exp_d = 1'b1;
        else             exp_d = c[0];
        checks++;
        if (d_out !== exp_d) begin
          failures++;
          $display("FAIL sel=%0d comp=%0d d=%0d expected %0d", s, c, d_out, exp_d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
