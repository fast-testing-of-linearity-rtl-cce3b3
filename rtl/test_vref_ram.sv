// test_vref_ram: test-mode RAM of the DC-linearity test.
//
// During a linearity test the analog input is a slow staircase whose value at
// each sampling instant is known. Each entry of this RAM holds the reference
// code the SAR should start from at one test point, normally the expected
// output code itself. The converter then needs only the last few comparison
// steps instead of the full search. Writes are synchronous; the read is
// synchronous too (rdata is valid the cycle after ren), which is enough
// because the read happens during the sample phase. One entry per output code
// (2^N entries) and the port layout are this design's choices. No reset.
`timescale 1ns / 1ps
module test_vref_ram #(
  parameter int unsigned N_BITS = sar_pkg::N_BITS_DEF,
  parameter int unsigned DEPTH  = sar_pkg::TEST_DEPTH_DEF,
  localparam int unsigned AW = $clog2(DEPTH),
  localparam int unsigned VW = N_BITS + 2
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [AW-1:0]        waddr,
  input  logic signed [VW-1:0] wdata,
  input  logic                 ren,
  input  logic [AW-1:0]        raddr,
  output logic signed [VW-1:0] rdata
);

  logic signed [VW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)  mem[waddr] <= wdata;
    if (ren) rdata      <= mem[raddr];
  end

endmodule
