// Per-channel error register with a safe copy into the VME clock domain.
//
// The specification counts the errors of a channel in a single register that
// VME reads.  The counter lives in the slot's receive clock domain (global or
// forwarded clock) and adds the bit errors of each checked frame, saturating
// at all ones.  Because a frame may add many errors at once, a Gray-coded
// counter cannot cross the clock boundary; a request/acknowledge toggle
// handshake is used instead: the bus side toggles req, the receive side copies
// the counter into a holding register and toggles ack, and the bus side takes
// the (by then stable) holding register once it sees ack.  The copy is renewed
// continuously, every few bus clock cycles plus two receive clock cycles.
// clear zeroes the counter (receive clock domain pulse).  Saturation and the
// handshake are this design's choices.
module error_counter #(
  parameter int unsigned W    = 32,
  parameter int unsigned IN_W = 8
) (
  // receive clock domain
  input  logic            rx_clk,
  input  logic            rx_rst_n,
  input  logic            clear,
  input  logic            inc_valid,
  input  logic [IN_W-1:0] inc,
  // VME clock domain
  input  logic            bus_clk,
  input  logic            bus_rst_n,
  output logic [W-1:0]    count
);
  timeunit 1ns; timeprecision 1ps;

  logic [W-1:0] cnt_q, hold_q;
  logic [W:0]   sum;
  logic         req_q, ack_q;
  logic [1:0]   req_sync, ack_sync;
  logic         ack_seen;

  // ---------------------------------------------------------- receive side
  assign sum = {1'b0, cnt_q} + (W+1)'(inc);

  always_ff @(posedge rx_clk or negedge rx_rst_n) begin
    if (!rx_rst_n) begin
      cnt_q    <= '0;
      hold_q   <= '0;
      req_sync <= '0;
      ack_q    <= 1'b0;
    end else begin
      if (clear)          cnt_q <= '0;
      else if (inc_valid) cnt_q <= sum[W] ? '1 : sum[W-1:0];
      req_sync <= {req_sync[0], req_q};
      if (req_sync[1] != ack_q) begin
        hold_q <= cnt_q;
        ack_q  <= req_sync[1];
      end
    end
  end

  // -------------------------------------------------------------- bus side
  assign ack_seen = (ack_sync[1] == req_q);

  always_ff @(posedge bus_clk or negedge bus_rst_n) begin
    if (!bus_rst_n) begin
      ack_sync <= '0;
      req_q    <= 1'b0;
      count    <= '0;
    end else begin
      ack_sync <= {ack_sync[0], ack_q};
      if (ack_seen) begin
        count <= hold_q;
        req_q <= ~req_q;
      end
    end
  end
endmodule
