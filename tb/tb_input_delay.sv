// Testbench for the input delay model: for a set of tap values, both edges of
// the input must reappear tap * 78 ps later, and a pulse shorter than the
// delay must pass through unchanged (transport delay).
module tb_input_delay;
  timeunit 1ns; timeprecision 1ps;

  logic din = 0;
  logic [5:0] tap = '0;
  logic dout;
  int checks = 0, failures = 0;

  input_delay #(.TW(6), .TAP_PS(78)) dut (.*);

  realtime t_in, t_out;

  task automatic edge_check(input logic v, input int t);
    real want, got;
    din = v; t_in = $realtime;
    @(dout);
    t_out = $realtime;
    got  = (t_out - t_in) * 1000.0;
    want = t * 78.0;
    checks++;
    if (dout !== v || got < want - 1.5 || got > want + 1.5) begin
      failures++; $display("tap %0d: delay %0.1f ps want %0.1f", t, got, want);
    end
  endtask

  initial begin
    #10;
    for (int t = 1; t < 64; t += 5) begin
      tap = 6'(t);
      #5;
      edge_check(1'b1, t);
      #5;
      edge_check(1'b0, t);
      #5;
    end
    // short pulse through a long delay
    tap = 6'd63;
    #5;
    din = 1; #1; din = 0;
    t_in = $realtime;
    @(posedge dout); t_out = $realtime;
    checks++;
    if ((t_out - t_in + 1.0) * 1000.0 < 4913.0 || (t_out - t_in + 1.0) * 1000.0 > 4916.0) begin
      failures++; $display("short pulse rose after %0.3f ns", t_out - t_in + 1.0);
    end
    @(negedge dout);
    checks++;
    if (($realtime - t_in) * 1000.0 < 4913.0 || ($realtime - t_in) * 1000.0 > 4916.0) begin
      failures++; $display("short pulse fell after %0.3f ns", $realtime - t_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
