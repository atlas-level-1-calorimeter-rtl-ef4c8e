// Testbench for bpt_fpga, the FPGA core without pad delays and CPLD.  DTACK*
// is modelled as the CPLD gives it.  Four slots send counter patterns at
// 320 Mb/s: a parity slot, a ramp slot, a slot checking both, and a slot
// strobed by its own forwarded clock on Px_0, sent from a clock 1.2 ns out
// of phase with the global clock (parity is not checked there).  Injected single bit flips must be counted
// exactly; disabled slots must count nothing.
module tb_bpt_fpga;
  import bpt_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int NS = 16;
  localparam real T = 3.125;

  logic clk40 = 0, clk_fast = 0, clk_fwd = 0;
  logic [NS-1:0][N_LINES-1:0] px;
  vme_in_t vme;
  logic [4:0] ga = 5'd7;
  logic [15:0] d_out;
  logic d_oe;
  logic [NS*N_LINES-1:0][TAP_W-1:0] taps;
  int checks = 0, failures = 0;

  bpt_fpga dut (.*);

  always #(T / 2.0) clk_fast = ~clk_fast;
  always @(clk_fast) clk_fwd <= #1.2 clk_fast;   // sender clock of slot 3
  always #12.5 clk40 = ~clk40;

  logic dtack_n;
  logic [15:0] rd_bus;
  int ds_cnt = 0;
  always @(posedge clk40) ds_cnt <= vme.ds0_n ? 0 : ds_cnt + 1;
  assign dtack_n = !(ds_cnt >= 6 && vme.a[23:19] == ga);
  assign rd_bus  = d_oe ? d_out : 16'hDEAD;

  `include "vme_master.svh"

  logic [23:0] ctr [4];
  int exp_par [4], exp_ramp [4];
  int flip_rate = 0;

  function automatic logic [N_LINES-1:0] next_word(input int s);
    logic [N_LINES-1:0] w;
    w = {ctr[s], ~(^ctr[s])};
    ctr[s] = ctr[s] + 1'b1;
    if (flip_rate != 0 && $urandom_range(flip_rate - 1) == 0) begin
      int b;
      b = (s == 3) ? $urandom_range(24, 1) : $urandom_range(24);
      w[b] = ~w[b];
      if (b != 0) exp_ramp[s]++;
      exp_par[s]++;
    end
    return w;
  endfunction

  always @(negedge clk_fast) for (int s = 0; s < 3; s++) px[s] <= next_word(s);
  always @(negedge clk_fwd) px[3][N_LINES-1:1] <= next_word(3)[N_LINES-1:1];
  always @(clk_fwd) px[3][0] = clk_fwd;
  // slots 4.. carry random data; they stay disabled
  always @(negedge clk_fast) for (int s = 4; s < NS; s++) px[s] <= N_LINES'($urandom);

  function automatic logic [23:0] ma(input logic [18:0] off);
    return {ga, off};
  endfunction

  logic [15:0] lo, hi;
  initial begin
    vme = '{sysreset_n: 1'b0, a: '0, d: '0, ds0_n: 1'b1, write_n: 1'b1};
    for (int s = 0; s < 4; s++) begin ctr[s] = 24'($urandom); exp_par[s] = 0; exp_ramp[s] = 0; end
    repeat (4) @(posedge clk40);
    vme.sysreset_n = 1;
    repeat (4) @(posedge clk40);
    bus_armed = 1;
    vme_expect(ma(A_FW_ID), FW_ID, "fw id");
    vme_write(ma(A_SLOT_CFG + 0), {12'h0, 4'b1000 | 4'(CHK_PARITY)});
    vme_write(ma(A_SLOT_CFG + 2), {12'h0, 4'b1000 | 4'(CHK_RAMP)});
    vme_write(ma(A_SLOT_CFG + 4), {12'h0, 4'b1000 | 4'(CHK_BOTH)});
    vme_write(ma(A_SLOT_CFG + 6), {12'h0, 4'b1100 | 4'(CHK_BOTH)});
    repeat (20) @(posedge clk40);
    vme_write(ma(A_CTRL), 16'h0002);
    repeat (20) @(posedge clk40);
    vme_expect(ma(A_LOCK), 16'h000E, "lock");
    vme_write(ma(A_CTRL), 16'h0001);
    repeat (10) @(posedge clk40);
    for (int s = 0; s < 4; s++) begin exp_par[s] = 0; exp_ramp[s] = 0; end
    @(negedge clk_fast) flip_rate = 30;
    repeat (60) @(posedge clk40);
    @(negedge clk_fast) flip_rate = 0;
    repeat (20) @(posedge clk40);
    for (int s = 0; s < NS; s++) begin
      int want;
      want = s == 0 ? exp_par[0] : s == 1 ? exp_ramp[1] : s == 2 ? exp_par[2] + exp_ramp[2]
           : s == 3 ? exp_ramp[3] : 0;
      vme_read(ma(A_ERR + 19'(4*s)), lo);
      vme_read(ma(A_ERR + 19'(4*s + 2)), hi);
      checks++;
      if ({hi, lo} != 32'(want) || (s < 4 && want == 0)) begin
        failures++; $display("slot %0d: %0d counted, %0d injected", s, {hi, lo}, want);
      end
    end
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
