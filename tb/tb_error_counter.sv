// Testbench for error_counter: random increments in a 320 MHz receive domain,
// read in a 40 MHz bus domain.  The bus-side copy must never run ahead of the
// true sum, must never go backwards, must reach the sum within a bounded
// time once increments stop, must follow clear, and a narrow instance must
// saturate instead of wrapping.
module tb_error_counter;
  timeunit 1ns; timeprecision 1ps;

  localparam int W = 32, IN_W = 8;

  logic rx_clk = 0, bus_clk = 0, rx_rst_n = 0, bus_rst_n = 0;
  logic clear = 0, inc_valid = 0;
  logic [IN_W-1:0] inc = '0;
  logic [W-1:0] count;
  logic [9:0] count_s;
  int checks = 0, failures = 0;

  error_counter #(.W(W), .IN_W(IN_W)) dut (.*);
  error_counter #(.W(10), .IN_W(IN_W)) dut_sat (.rx_clk, .rx_rst_n, .clear, .inc_valid,
    .inc, .bus_clk, .bus_rst_n, .count(count_s));

  always #1.5625 rx_clk = ~rx_clk;
  always #12.5   bus_clk = ~bus_clk;

  longint sum = 0;
  logic [W-1:0] prev = '0;
  bit mon_en = 1;   // off while the copy catches up with a clear

  always @(posedge bus_clk) if (bus_rst_n && mon_en) begin
    checks++;
    if (count > sum || count < prev) begin
      failures++;
      $display("count %0d outside [%0d, %0d]", count, prev, sum);
    end
    prev = count;
  end

  task automatic settle_and_check(input longint want, input string what);
    repeat (10) @(posedge bus_clk);
    checks++;
    if (count != W'(want)) begin failures++; $display("%s: count %0d want %0d", what, count, want); end
  endtask

  initial begin
    repeat (3) @(posedge bus_clk);
    rx_rst_n = 1; bus_rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge rx_clk);
      inc_valid = ($urandom_range(3) == 0);
      inc = IN_W'($urandom_range(200));
      if (inc_valid) sum += inc;
    end
    @(negedge rx_clk); inc_valid = 0;
    settle_and_check(sum, "after burst");
    checks++;
    if (count_s != 10'h3FF) begin failures++; $display("narrow counter %0d not saturated", count_s); end
    // clear
    @(negedge rx_clk); clear = 1; @(negedge rx_clk); clear = 0;
    sum = 0; mon_en = 0;
    settle_and_check(0, "after clear");
    prev = '0; mon_en = 1;
    for (int i = 0; i < 100; i++) begin
      @(negedge rx_clk); inc_valid = 1; inc = 8'd3; sum += 3;
    end
    @(negedge rx_clk); inc_valid = 0;
    settle_and_check(sum, "after second burst");
    checks++;
    if (count_s != 10'd300) begin failures++; $display("narrow counter %0d want 300", count_s); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
