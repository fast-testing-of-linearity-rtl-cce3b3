// tb_comparator: random input pairs, including pairs a fraction of an LSB
// apart, against the expected decision vp > vn + OFFSET, once with an ideal
// comparator and once with a 0.3 LSB offset.
`timescale 1ns / 1ps
module tb_comparator;
  real  vp = 0.0, vn = 0.0;
  logic out0, out1;
  int checks = 0, failures = 0;

  comparator                 dut0 (.vp, .vn, .out(out0));
  comparator #(.OFFSET(0.3)) dut1 (.vp, .vn, .out(out1));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      vn = $urandom_range(0, 1023);
      vp = (i % 2) ? vn + ($urandom_range(0, 100) - 50) / 100.0
                   : $urandom_range(0, 1023000) / 1000.0;
      #1;
      checks += 2;
      if (out0 !== (vp > vn)) begin
        failures++;
        $display("FAIL ideal vp=%f vn=%f out=%0d", vp, vn, out0);
      end
      if (out1 !== (vp > vn + 0.3)) begin
        failures++;
        $display("FAIL offset vp=%f vn=%f out=%0d", vp, vn, out1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
