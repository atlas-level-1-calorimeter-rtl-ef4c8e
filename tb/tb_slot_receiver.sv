// Testbench for slot_receiver: a 320 Mb/s counter pattern with odd parity on
// Px_0, sampled on a 320 MHz receive clock, configured and read from a 40 MHz
// bus domain.  Single bit flips are injected at random: a flipped data bit is
// one ramp error plus one parity error, a flipped parity bit one parity error.
// Checks the error count seen in the bus domain against the injected errors
// in parity, ramp and both modes, the clear and resync commands, the lock
// flag, and forwarded clock mode (Px_0 carries the clock, no parity).
module tb_slot_receiver;
  import bpt_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic rx_clk = 0, bus_clk = 0, bus_rst_n = 0;
  logic [N_LINES-1:0] lines;
  slot_cfg_t cfg;
  logic clear_cmd = 0, resync_cmd = 0;
  logic [31:0] err_count;
  logic locked;
  int checks = 0, failures = 0;

  slot_receiver #(.DES(8), .ODD_PARITY(1'b1), .CW(32)) dut (.*);

  always #1.5625 rx_clk = ~rx_clk;
  always #12.5   bus_clk = ~bus_clk;

  logic [23:0] ctr = 24'h123456;
  bit  fwd = 0;
  bit  do_jump = 0;               // skip part of the count once
  int  flip_rate = 0;            // 1 in flip_rate samples gets a flip, 0: none
  int  exp_par = 0, exp_ramp = 0;
  logic [N_LINES-1:0] word;

  // transmitter: launch on the falling edge
  always @(negedge rx_clk) begin
    word = {ctr, ~(^ctr)};
    ctr <= ctr + (do_jump ? 24'd78 : 24'd1);
    do_jump = 0;
    if (flip_rate != 0 && $urandom_range(flip_rate - 1) == 0) begin
      int b;
      b = fwd ? $urandom_range(24, 1) : $urandom_range(24);
      word[b] = ~word[b];
      if (b != 0) exp_ramp++;
      exp_par++;
    end
    lines[N_LINES-1:1] <= word[N_LINES-1:1];
    if (!fwd) lines[0] <= word[0];
  end
  always @(rx_clk) if (fwd) lines[0] = rx_clk;

  task automatic bus_pulse(ref logic sig);
    @(negedge bus_clk); sig = 1; @(negedge bus_clk); sig = 0;
  endtask

  task automatic check_count(input int want, input string what);
    repeat (12) @(posedge bus_clk);
    checks++;
    if (err_count != 32'(want)) begin
      failures++; $display("%s: err_count %0d want %0d", what, err_count, want);
    end
  endtask

  task automatic run(input chk_mode_e m, input int frames, input string what);
    int want;
    cfg.mode = m;
    flip_rate = 0;
    repeat (20) @(posedge bus_clk);
    bus_pulse(clear_cmd);
    repeat (4) @(posedge bus_clk);
    exp_par = 0; exp_ramp = 0;
    @(negedge rx_clk);
    flip_rate = 7;
    repeat (frames * 8) @(negedge rx_clk);
    flip_rate = 0;
    want = (m == CHK_PARITY ? exp_par : 0) + (m == CHK_RAMP ? exp_ramp : 0)
         + (m == CHK_BOTH ? exp_par + exp_ramp : 0);
    if (fwd) want = exp_ramp;
    check_count(want, what);
    checks++;
    if (want == 0) begin failures++; $display("%s: no errors injected", what); end
    checks++;
    if ((m != CHK_PARITY) != locked) begin
      failures++; $display("%s: locked=%0b", what, locked);
    end
  endtask

  initial begin
    cfg = '{enable: 1'b1, fwd_clk: 1'b0, mode: CHK_OFF};
    lines = '0;
    repeat (3) @(posedge bus_clk);
    bus_rst_n = 1;
    run(CHK_PARITY, 60, "parity");
    run(CHK_RAMP,   60, "ramp");
    run(CHK_BOTH,   60, "both");

    // clear
    bus_pulse(clear_cmd);
    check_count(0, "clear");

    // resync: a pattern jump costs errors, after resync it locks again
    @(posedge rx_clk) do_jump = 1;
    repeat (12) @(posedge bus_clk);
    checks++;
    if (err_count == 0) begin failures++; $display("jump not counted"); end
    bus_pulse(resync_cmd);
    repeat (2) @(posedge bus_clk);
    bus_pulse(clear_cmd);
    check_count(0, "after resync");
    checks++; if (!locked) begin failures++; $display("not relocked"); end

    // forwarded clock on Px_0, parity not checked
    cfg.enable = 0;
    repeat (6) @(posedge bus_clk);
    fwd = 1;
    cfg.fwd_clk = 1;
    cfg.enable = 1;
    run(CHK_BOTH, 60, "forwarded clock");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
