// tb_weight_ram: writes random weights into every entry of the weight RAM,
// then reads all entries back through the asynchronous read port and compares
// with a copy kept in the testbench; a second pass overwrites half of the
// entries and checks that only those changed.
`timescale 1ns / 1ps
module tb_weight_ram;
  localparam int N = 10, M = 16, AW = $clog2(M);

  logic          clk = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [N-1:0]  wdata = '0, rdata;
  logic [N-1:0]  model [M];
  int checks = 0, failures = 0;

  weight_ram #(.N_BITS(N), .MAX_STEPS(M)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input int a, input logic [N-1:0] v);
    @(negedge clk);
    we = 1; waddr = AW'(a); wdata = v;
    @(negedge clk);
    we = 0;
    model[a] = v;
  endtask

  task automatic read_all();
    for (int a = 0; a < M; a++) begin
      raddr = AW'(a);
      #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL addr %0d read %0d expected %0d", a, rdata, model[a]);
      end
    end
  endtask

  initial begin
    for (int a = 0; a < M; a++) write(a, N'($urandom));
    read_all();
    for (int a = 0; a < M; a += 2) write(a, N'($urandom));
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
