// Testbench for the TTC clock extraction model.  A 160 Mbaud biphase mark
// stream (a line transition at every cell boundary, an extra one in the middle
// of a cell for a one) carrying only zeros is driven; the extracted clock
// must have a period of two cells (the 25 ns bunch crossing) and a 50 % duty
// cycle, and there must be one edge pulse per cell.  The check values come
// from the cell time, not from the model.
module tb_ttc_clock_recovery;
  timeunit 1ns; timeprecision 1ps;

  localparam real CELL = 12.5;

  logic ttc_in = 0;
  logic edge_pulse, clk_out;
  int checks = 0, failures = 0;

  ttc_clock_recovery #(.DIV(2), .PULSE_NS(1.0)) dut (.*);

  int pulses = 0;
  always @(posedge edge_pulse) pulses++;

  realtime t_rise [$];
  realtime t_fall [$];
  always @(posedge clk_out) t_rise.push_back($realtime);
  always @(negedge clk_out) t_fall.push_back($realtime);

  initial begin
    for (int c = 0; c < 400; c++) begin
      #(CELL) ttc_in = ~ttc_in;   // zero: boundary transition only
    end
    #(CELL);
    checks++;
    if (pulses != 400) begin failures++; $display("%0d edge pulses, want 400", pulses); end
    for (int i = 1; i < t_rise.size(); i++) begin
      checks++;
      if (t_rise[i] - t_rise[i-1] < 24.99 || t_rise[i] - t_rise[i-1] > 25.01) begin
        failures++; $display("period %0.3f ns", t_rise[i] - t_rise[i-1]);
      end
    end
    for (int i = 0; i < t_fall.size() && i < t_rise.size(); i++) begin
      realtime hi;
      hi = t_fall[i] - t_rise[i];
      if (hi < 0) hi = -hi;
      checks++;
      if (hi < 12.49 || hi > 12.51) begin failures++; $display("half period %0.3f ns", hi); end
    end
    checks++;
    if (t_rise.size() < 190) begin failures++; $display("%0d clock periods", t_rise.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
