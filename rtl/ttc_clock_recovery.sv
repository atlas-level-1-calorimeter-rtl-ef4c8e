// Behavioural model (not synthesizable logic): clock extraction from the TTC
// line signal.
//
// As the specification describes, the conditioned TTC signal is XORed with a
// slightly delayed copy of itself, which gives a short pulse at every edge
// of the line signal, and the pulse train is divided down to a clock that then
// goes to the FPGA's PLL and the external jitter cleaner (both outside this
// model).  The gate delay of the delayed copy (PULSE_NS) and the division
// (DIV edges per output clock period) are not given by the specification.
// With DIV = 2 the output is the bunch clock when the line changes only at
// the bit cell boundaries of the TTC stream (80 Mb/s biphase mark code at
// 160 Mbaud, two 12.5 ns bit cells per bunch crossing, data zero);
// mid-cell transitions carrying ones are not filtered out by this simple
// divider.
module ttc_clock_recovery #(
  parameter int unsigned DIV      = 2,
  parameter real         PULSE_NS = 1.0
) (
  input  logic ttc_in,
  output logic edge_pulse,
  output logic clk_out
);
  timeunit 1ns; timeprecision 1ps;

  logic ttc_dly;
  int unsigned cnt;

  initial begin
    ttc_dly = 1'b0;
    clk_out = 1'b0;
    cnt     = 0;
  end

  always @(ttc_in) ttc_dly <= #(PULSE_NS) ttc_in;

  assign edge_pulse = ttc_in ^ ttc_dly;

  // toggle the output every DIV/2 edges
  always @(posedge edge_pulse) begin
    if (cnt + 1 >= DIV / 2) begin
      cnt     <= 0;
      clk_out <= !clk_out;
    end else begin
      cnt <= cnt + 1;
    end
  end
endmodule
