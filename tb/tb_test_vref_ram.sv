// tb_test_vref_ram: fills the test-mode RAM with signed preset values, reads
// them back in random order and checks both the data and the one-cycle read
// latency (the output changes only on the edge where ren is high).
`timescale 1ns / 1ps
module tb_test_vref_ram;
  localparam int N = 10, DEPTH = 1024, AW = $clog2(DEPTH), VW = N + 2;

  logic                 clk = 0, we = 0, ren = 0;
  logic [AW-1:0]        waddr = '0, raddr = '0;
  logic signed [VW-1:0] wdata = '0, rdata;
  logic signed [VW-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  test_vref_ram #(.N_BITS(N), .DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .ren, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = VW'(a - 8 + int'($urandom_range(0, 16)));
      model[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 3000; i++) begin
      int a;
      logic signed [VW-1:0] prev;
      a = int'($urandom_range(0, DEPTH - 1));
      @(negedge clk);
      raddr = AW'(a); ren = 1;
      prev = rdata;
      #1;
      checks++;   // no change before the clock edge
      if (rdata !== prev) begin
        failures++;
        $display("FAIL read data changed before the clock edge");
      end
      @(negedge clk);
      ren = 0;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL addr %0d read %0d expected %0d", a, rdata, model[a]);
      end
      raddr = AW'(a + 1);
      @(negedge clk);
      checks++;   // holds while ren is low
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL data not held at addr %0d", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
