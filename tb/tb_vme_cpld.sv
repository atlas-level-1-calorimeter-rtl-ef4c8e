// Testbench for vme_cpld: VME accesses through the reduced bus.  Checks the
// identifier and geographic address registers, the DTACK* latency (fixed
// number of clocks) for its own and for FPGA addresses, that the CPLD does not
// drive data for FPGA addresses, that other modules' addresses get no DTACK*,
// the configuration control bits, the configuration status inputs, and that a
// configuration data write puts the word on the port with exactly one CCLK
// pulse after the data are valid.
module tb_vme_cpld;
  import bpt_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk40 = 0;
  vme_in_t vme;
  logic [4:0] ga = 5'd9;
  logic dtack_n;
  logic [15:0] d_out;
  logic d_oe;
  logic [4:0] fpga_ga;
  logic cfg_prog_b, cfg_csi_b, cfg_rdwr_b, cfg_cclk;
  logic [15:0] cfg_d;
  logic cfg_init_b = 1, cfg_done = 0;
  logic [15:0] rd_bus;
  int checks = 0, failures = 0;

  vme_cpld #(.ACK_DLY(3)) dut (.clk(clk40), .*);

  assign rd_bus = d_oe ? d_out : 16'hDEAD;

  always #12.5 clk40 = ~clk40;

  `include "vme_master.svh"

  function automatic logic [23:0] mod_addr(input logic [18:0] off);
    return {ga, off};
  endfunction

  // CCLK pulses and the data they clock
  int cclk_pulses = 0;
  logic [15:0] cclk_data;
  always @(posedge cfg_cclk) begin cclk_pulses++; cclk_data = cfg_d; end

  logic [15:0] r;
  int cyc; bit ack;
  initial begin
    vme = '{sysreset_n: 1'b0, a: '0, d: '0, ds0_n: 1'b1, write_n: 1'b1};
    repeat (4) @(posedge clk40);
    vme.sysreset_n = 1;
    repeat (4) @(posedge clk40);
    bus_armed = 1;

    vme_expect(mod_addr(A_CPLD_ID), CPLD_ID, "id");
    vme_expect(mod_addr(A_CPLD_GA), 16'(ga), "ga");
    checks++; if (fpga_ga != ga) begin failures++; $display("fpga_ga %0d", fpga_ga); end

    // DTACK latency: 2 synchroniser stages, 1 decode, ACK_DLY
    vme_access(mod_addr(A_CPLD_ID), 0, 0, r, cyc, ack);
    checks++; if (!ack || cyc != 6) begin failures++; $display("dtack after %0d clocks", cyc); end

    // FPGA region: DTACK but no data from the CPLD
    vme_access(mod_addr(A_FW_ID), 0, 0, r, cyc, ack);
    checks++; if (!ack || cyc != 6) begin failures++; $display("fpga region dtack %0b after %0d", ack, cyc); end
    checks++; if (r !== 16'hDEAD) begin failures++; $display("CPLD drove %h for FPGA address", r); end

    // another slot: no answer
    vme_access({5'd10, A_CPLD_ID}, 0, 0, r, cyc, ack);
    checks++; if (ack) begin failures++; $display("answered for another slot"); end

    // configuration control
    checks++; if (cfg_prog_b !== 1 || cfg_csi_b !== 1 || cfg_rdwr_b !== 0) begin
      failures++; $display("config port idle levels wrong");
    end
    vme_write(mod_addr(A_CFG_CTRL), 16'h0001);
    checks++; if (cfg_prog_b !== 0) begin failures++; $display("PROG not asserted"); end
    vme_expect(mod_addr(A_CFG_CTRL), 16'h0001, "ctrl readback");
    vme_write(mod_addr(A_CFG_CTRL), 16'h0002);
    checks++; if (cfg_prog_b !== 1 || cfg_csi_b !== 0) begin failures++; $display("CS not asserted"); end

    // status inputs
    vme_expect(mod_addr(A_CFG_STAT), 16'h0001, "status init");
    cfg_done = 1; cfg_init_b = 0;
    vme_expect(mod_addr(A_CFG_STAT), 16'h0002, "status done");

    // configuration data words
    for (int i = 0; i < 8; i++) begin
      logic [15:0] w;
      int n_prev;
      w = 16'($urandom);
      n_prev = cclk_pulses;
      vme_write(mod_addr(A_CFG_DATA), w);
      checks++;
      if (cclk_pulses != n_prev + 1 || cclk_data !== w) begin
        failures++; $display("config word %h: %0d pulses, clocked %h", w, cclk_pulses - n_prev, cclk_data);
      end
    end

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
