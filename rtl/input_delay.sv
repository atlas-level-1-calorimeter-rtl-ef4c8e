// Behavioural model (not synthesizable logic): programmable input delay of one
// FPGA input pin.
//
// The specification relies on the fine-grain delay available on every input
// pin of the FPGA to deskew the incoming lines under VME control, found by a
// software delay scan.  In the FPGA this is a vendor delay element; here it is
// a transport delay of tap * TAP_PS picoseconds.  64 taps of 78 ps are the
// figures of the chosen FPGA family's input delay element, not of the
// specification.  The tap value may change at any time; a change affects edges
// that arrive after it.
module input_delay #(
  parameter int unsigned TW     = 6,
  parameter int unsigned TAP_PS = 78
) (
  input  logic          din,
  input  logic [TW-1:0] tap,
  output logic          dout
);
  timeunit 1ns; timeprecision 1ps;

  // Every edge travels on its own (transport delay), so pulses shorter than
  // the delay survive: edges are queued with their due time and replayed.
  realtime due_q [$];
  logic    val_q [$];
  event    kick;

  always @(din) begin
    due_q.push_back($realtime + real'(tap) * real'(TAP_PS) / 1000.0);
    val_q.push_back(din);
    ->kick;
  end

  initial begin
    dout = 1'b0;
    forever begin
      if (due_q.size() == 0) @(kick);
      else begin
        if (due_q[0] > $realtime) #(due_q[0] - $realtime);
        dout = val_q.pop_front();
        void'(due_q.pop_front());
      end
    end
  end
endmodule
