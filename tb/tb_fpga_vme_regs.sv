// Testbench for fpga_vme_regs.  DTACK* is produced here the way the CPLD does
// it (six clocks after DS0*), and the FPGA's read data must be on the bus by
// then.  Checks the identifier, the per-slot configuration registers and
// their outputs, the delay taps of all 400 lines (random values written and
// read back and compared with the tap outputs), the clear/resync command
// pulses, the lock flags and the 32-bit error registers read as two halves
// with the upper half latched, and that CPLD offsets get no data from the FPGA.
module tb_fpga_vme_regs;
  import bpt_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int NS = 16, NL = 25, TW = 6, CW = 32;

  logic clk40 = 0;
  vme_in_t vme;
  logic [4:0] ga = 5'd3;
  logic [15:0] d_out;
  logic d_oe, rst_n;
  slot_cfg_t [NS-1:0] slot_cfg;
  logic [NS*NL-1:0][TW-1:0] taps;
  logic clear_cmd, resync_cmd;
  logic [NS-1:0][CW-1:0] err_count;
  logic [NS-1:0] locked;
  logic dtack_n;
  logic [15:0] rd_bus;
  int checks = 0, failures = 0;

  fpga_vme_regs #(.NS(NS), .NL(NL), .TW(TW), .CW(CW)) dut (.clk(clk40), .*);

  always #12.5 clk40 = ~clk40;
  assign rd_bus = d_oe ? d_out : 16'hDEAD;

  // DTACK* as the CPLD gives it
  int ds_cnt = 0;
  always @(posedge clk40) ds_cnt <= vme.ds0_n ? 0 : ds_cnt + 1;
  assign dtack_n = !(ds_cnt >= 6 && vme.a[23:19] == ga);

  int n_clear = 0, n_resync = 0;
  always @(posedge clk40) if (rst_n) begin
    if (clear_cmd)  n_clear++;
    if (resync_cmd) n_resync++;
  end

  `include "vme_master.svh"

  function automatic logic [23:0] mod_addr(input logic [18:0] off);
    return {ga, off};
  endfunction

  logic [TW-1:0] tap_ref [NS*NL];
  logic [3:0]    cfg_ref [NS];
  logic [15:0]   r;

  initial begin
    vme = '{sysreset_n: 1'b0, a: '0, d: '0, ds0_n: 1'b1, write_n: 1'b1};
    for (int s = 0; s < NS; s++) err_count[s] = $urandom;
    locked = 16'hA5C3;
    repeat (4) @(posedge clk40);
    vme.sysreset_n = 1;
    repeat (4) @(posedge clk40);
    bus_armed = 1;

    vme_expect(mod_addr(A_FW_ID), FW_ID, "fw id");
    vme_expect(mod_addr(A_CPLD_ID), 16'hDEAD, "CPLD offset not driven");
    vme_expect(mod_addr(A_LOCK), 16'hA5C3, "lock flags");

    for (int s = 0; s < NS; s++) begin
      cfg_ref[s] = 4'($urandom);
      vme_write(mod_addr(A_SLOT_CFG + 19'(2*s)), {12'h0, cfg_ref[s]});
    end
    for (int s = 0; s < NS; s++) begin
      vme_expect(mod_addr(A_SLOT_CFG + 19'(2*s)), {12'h0, cfg_ref[s]}, "slot cfg");
      checks++;
      if (slot_cfg[s] !== slot_cfg_t'(cfg_ref[s])) begin failures++; $display("slot_cfg[%0d] output", s); end
    end

    for (int l = 0; l < NS*NL; l++) begin
      tap_ref[l] = TW'($urandom);
      vme_write(mod_addr(A_DELAY + 19'(2*l)), {10'h0, tap_ref[l]});
    end
    for (int l = 0; l < NS*NL; l += 7) vme_expect(mod_addr(A_DELAY + 19'(2*l)), {10'h0, tap_ref[l]}, "tap");
    for (int l = 0; l < NS*NL; l++) begin
      checks++;
      if (taps[l] !== tap_ref[l]) begin failures++; $display("tap %0d = %0d want %0d", l, taps[l], tap_ref[l]); end
    end

    vme_write(mod_addr(A_CTRL), 16'h0001);
    vme_write(mod_addr(A_CTRL), 16'h0002);
    vme_write(mod_addr(A_CTRL), 16'h0003);
    checks++; if (n_clear != 2 || n_resync != 2) begin
      failures++; $display("commands: %0d clears %0d resyncs", n_clear, n_resync);
    end

    for (int s = 0; s < NS; s++) begin
      logic [31:0] want;
      want = err_count[s];
      vme_expect(mod_addr(A_ERR + 19'(4*s)), want[15:0], "err low");
      err_count[s] = err_count[s] + 32'h0001_0000;   // changes after the low half was read
      vme_expect(mod_addr(A_ERR + 19'(4*s + 2)), want[31:16], "err high latched");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
