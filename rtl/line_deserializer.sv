// Deserialiser for one processor slot.
//
// The specification has the incoming lines deserialised in the FPGA's
// dedicated input serdes so that the check logic runs at a fraction of the line
// rate.  This module is the logic equivalent: on every receive clock edge it
// takes one W-bit sample of the slot's lines (one bit per line) and, after DES
// samples, presents them together as a frame with a one-cycle frame_valid.
// frame[0] is the oldest sample, frame[DES-1] the newest.  At 320 Mb/s and
// DES = 8 frames arrive at the 40 MHz bunch clock rate.  Frame boundaries are
// free running from reset; the checker does not depend on them.
//
// Timing: frame_valid and frame are registered; they appear on the clock edge
// after the edge that sampled the last sample of the frame.
module line_deserializer #(
  parameter int unsigned W   = 25,
  parameter int unsigned DES = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [W-1:0]          din,
  output logic [DES-1:0][W-1:0] frame,
  output logic                  frame_valid
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned CW = (DES > 1) ? $clog2(DES) : 1;

  logic [CW-1:0]             cnt;
  logic [DES-1:0][W-1:0]     shift_q;
  logic [DES-1:0][W-1:0]     shift_d;

  // shift_q[DES-1] holds the newest sample
  always_comb begin
    for (int k = 0; k < int'(DES) - 1; k++) shift_d[k] = shift_q[k+1];
    shift_d[DES-1] = din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt         <= '0;
      shift_q     <= '0;
      frame       <= '0;
      frame_valid <= 1'b0;
    end else begin
      shift_q     <= shift_d;
      frame_valid <= 1'b0;
      if (cnt == CW'(DES - 1)) begin
        cnt         <= '0;
        frame       <= shift_d;
        frame_valid <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
