// weight_ram: weighting-coefficient RAM of the generalized non-binary SAR.
//
// Entry j holds the weight by which the reference moves after the decision of
// step j (steps counted from 0): Vref(j+1) = Vref(j) + w[j] if the decision
// was 1 and Vref(j) - w[j] if it was 0. Loading 2^(N-2-j) gives the ordinary
// binary search; a redundant weight set with sum(w[i], i>j) >= w[j] gives
// range overlap, so a wrong decision can be corrected by the later steps.
// Writes are synchronous (we/waddr/wdata, from the test equipment or a host);
// the read port is asynchronous so the SAR logic sees the weight of the
// current step within the same cycle. The RAM has no reset: its contents are
// undefined until written. Depth and write interface are this design's
// choices; the RAM itself and its role follow the published prototype.
`timescale 1ns / 1ps
module weight_ram #(
  parameter int unsigned N_BITS    = sar_pkg::N_BITS_DEF,
  parameter int unsigned MAX_STEPS = sar_pkg::MAX_STEPS_DEF,
  localparam int unsigned AW = $clog2(MAX_STEPS)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [N_BITS-1:0] wdata,
  input  logic [AW-1:0]     raddr,
  output logic [N_BITS-1:0] rdata
);

  logic [N_BITS-1:0] mem [MAX_STEPS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
