// test_controller: digital controller of the DC-linearity test.
//
// Given a start and an end address of the test-mode RAM, it runs one
// conversion per test point: it reads the RAM entry of the current address
// (the preset reference of that point) and pulses conv_start in the same
// cycle, waits for the converter's eoc, reports the result with its address
// (result_valid, result_addr) and moves to the next address, wrapping modulo
// DEPTH, until the end address has been converted; then 'done' pulses. The
// same controller starts normal conversions: in normal mode the preset is
// simply not used, and start_addr = end_addr gives a single conversion.
// The published scheme names this controller and its start and end
// addresses and notes that automatic test equipment may play its role;
// the handshake and the counting order are this design's choices.
//   one test point every SAMPLE_CYC + steps + 2 cycles (8 cycles for the
//   4-step test mode at the default 2-cycle sample phase)
`timescale 1ns / 1ps
module test_controller #(
  parameter int unsigned DEPTH = sar_pkg::TEST_DEPTH_DEF,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,          // pulse: convert start_addr .. end_addr
  input  logic [AW-1:0] start_addr,
  input  logic [AW-1:0] end_addr,
  input  logic          eoc,          // end of conversion from the timing generator
  output logic          ram_ren,
  output logic [AW-1:0] addr,         // test-mode RAM read address
  output logic          conv_start,   // start pulse to the timing generator
  output logic          active,
  output logic          result_valid,
  output logic [AW-1:0] result_addr,
  output logic          done
);

  typedef enum logic [1:0] {C_IDLE, C_ISSUE, C_WAIT} cstate_e;

  cstate_e       state;
  logic [AW-1:0] last_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= C_IDLE;
      addr         <= '0;
      last_addr    <= '0;
      result_valid <= 1'b0;
      result_addr  <= '0;
      done         <= 1'b0;
    end else begin
      result_valid <= 1'b0;
      done         <= 1'b0;
      unique case (state)
        C_IDLE: if (run) begin
          addr      <= start_addr;
          last_addr <= end_addr;
          state     <= C_ISSUE;
        end
        C_ISSUE: state <= C_WAIT;
        C_WAIT: if (eoc) begin
          result_valid <= 1'b1;
          result_addr  <= addr;
          if (addr == last_addr) begin
            state <= C_IDLE;
            done  <= 1'b1;
          end else begin
            addr  <= addr + AW'(1);
            state <= C_ISSUE;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  assign conv_start = (state == C_ISSUE);
  assign ram_ren    = (state == C_ISSUE);
  assign active     = (state != C_IDLE);

endmodule
