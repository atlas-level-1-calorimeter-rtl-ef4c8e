// Workload testbench: the board at its default size run in the configurations
// it is built to measure.  Four line rates, 40, 80, 160 and 320 Mb/s (the
// present merger rate and the multiples of the bunch clock up to the highest
// rate), each with three crate populations: a full JEP crate (16 modules), a
// CP crate (14 modules) and a test crate of 13 spare JEMs.  Unpopulated slots
// are left disabled and see random levels on their lines.  In each run the
// populated slots send counter patterns with parity (every fourth slot uses a
// forwarded clock instead) with random single bit flips, and every slot's
// error register read over VME must equal the errors injected into it (zero
// for the disabled slots).
module tb_crate_rates;
  import bpt_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int NS = N_SLOTS;

  real  half = 1.5625;
  logic clk40 = 0, clk_fast = 0;
  logic ttc_in = 0, ttc_clk_recovered;
  logic [NS-1:0][N_LINES-1:0] px;
  vme_in_t vme;
  logic [4:0] ga = 5'd2;
  logic vme_dtack_n, vme_d_oe;
  logic [15:0] vme_d_out;
  logic cfg_prog_b, cfg_csi_b, cfg_rdwr_b, cfg_cclk;
  logic [15:0] cfg_d;
  logic cfg_init_b = 1'b1, cfg_done = 1'b1;
  int checks = 0, failures = 0;

  backplane_tester dut (.*);

  logic dtack_n;
  logic [15:0] rd_bus;
  assign dtack_n = vme_dtack_n;
  assign rd_bus  = vme_d_oe ? vme_d_out : 16'hDEAD;

  always #(half) clk_fast = ~clk_fast;
  always #12.5   clk40    = ~clk40;

  `include "vme_master.svh"

  bit          populated [NS];
  bit          fwd_of    [NS];
  logic [23:0] ctr       [NS];
  int          expect_n  [NS];
  int          flip_rate = 0;

  always @(negedge clk_fast) begin
    for (int s = 0; s < NS; s++) begin
      logic [N_LINES-1:0] w;
      if (!populated[s]) begin
        px[s] <= N_LINES'($urandom);
        continue;
      end
      w = {ctr[s], ~(^ctr[s])};
      ctr[s] = ctr[s] + 1'b1;
      if (flip_rate != 0 && $urandom_range(flip_rate - 1) == 0) begin
        int b;
        b = fwd_of[s] ? $urandom_range(24, 1) : $urandom_range(24);
        w[b] = ~w[b];
        // both checks: a data bit costs a ramp and a parity error, Px_0 parity only
        expect_n[s] += fwd_of[s] ? 1 : (b != 0 ? 2 : 1);
      end
      for (int l = (fwd_of[s] ? 1 : 0); l < N_LINES; l++) px[s][l] <= w[l];
    end
  end
  always @(clk_fast) for (int s = 0; s < NS; s++) if (populated[s] && fwd_of[s]) px[s][0] = clk_fast;

  function automatic logic [23:0] ma(input logic [18:0] off);
    return {ga, off};
  endfunction

  task automatic run(input int rate, input int modules, input string crate);
    logic [15:0] lo, hi;
    // disable, change the clock, set up
    for (int s = 0; s < NS; s++) vme_write(ma(A_SLOT_CFG + 19'(2*s)), 16'h0000);
    half = 1000.0 / real'(rate) / 2.0;
    for (int s = 0; s < NS; s++) begin
      populated[s] = (s < modules);
      fwd_of[s]    = (s % 4 == 3);
    end
    for (int s = 0; s < modules; s++)
      vme_write(ma(A_SLOT_CFG + 19'(2*s)), {12'h0, 1'b1, 1'(fwd_of[s]), 2'(CHK_BOTH)});
    repeat (20) @(posedge clk40);
    vme_write(ma(A_CTRL), 16'h0002);
    repeat (20 + 640 / rate) @(posedge clk40);
    vme_write(ma(A_CTRL), 16'h0001);
    repeat (10) @(posedge clk40);
    for (int s = 0; s < NS; s++) expect_n[s] = 0;
    @(negedge clk_fast) flip_rate = 50;
    repeat (400) @(negedge clk_fast);     // 400 bit periods per line
    flip_rate = 0;
    repeat (20 + 640 / rate) @(posedge clk40);
    for (int s = 0; s < NS; s++) begin
      vme_read(ma(A_ERR + 19'(4*s)), lo);
      vme_read(ma(A_ERR + 19'(4*s + 2)), hi);
      checks++;
      if ({hi, lo} != 32'(expect_n[s]) || (populated[s] && expect_n[s] == 0)) begin
        failures++;
        $display("%0d Mb/s %s slot %0d: %0d counted, %0d injected", rate, crate, s, {hi, lo}, expect_n[s]);
      end
    end
    vme_read(ma(A_LOCK), lo);
    checks++;
    if (lo != 16'((1 << modules) - 1)) begin failures++; $display("%0d Mb/s %s: lock %h", rate, crate, lo); end
    $display("%0d Mb/s, %s (%0d modules): checked", rate, crate, modules);
  endtask

  initial begin
    vme = '{sysreset_n: 1'b0, a: '0, d: '0, ds0_n: 1'b1, write_n: 1'b1};
    px  = '0;
    for (int s = 0; s < NS; s++) begin
      ctr[s] = 24'($urandom); populated[s] = 0; fwd_of[s] = 0; expect_n[s] = 0;
    end
    repeat (4) @(posedge clk40);
    vme.sysreset_n = 1;
    repeat (4) @(posedge clk40);
    bus_armed = 1;
    begin
      int rates [4] = '{40, 80, 160, 320};
      for (int i = 0; i < 4; i++) begin
        run(rates[i], 16, "JEP crate");
        run(rates[i], 14, "CP crate");
        run(rates[i], 13, "spare JEMs");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
