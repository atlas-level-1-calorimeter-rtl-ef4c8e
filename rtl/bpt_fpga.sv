// Synthesizable content of the backplane tester's processor FPGA.
//
// Sixteen slot receivers check the 25 lines of each processor slot; the VME
// register file configures them, sets the per-line input delays and reads the
// error registers.  Per the specification each slot can be strobed either with
// the global clock (Px_0 then carries parity) or with the clock forwarded by
// the sender on its Px_0; the selection is a clock multiplexer per slot,
// standing for the FPGA's regional/global clock buffer with select input.
// It should only be switched while the slot is disabled.
//
// Interface: clk40 clocks the VME logic (bus synchronous to the bunch clock
// rate), clk_fast is the global line-rate clock (320 MHz for 320 Mb/s),
// px are the already delayed input lines, taps go to the pad delay elements.
module bpt_fpga
  import bpt_pkg::*;
#(
  parameter int unsigned NS         = 16,
  parameter int unsigned DES        = 8,
  parameter bit          ODD_PARITY = 1'b1,
  parameter int unsigned CW         = 32
) (
  input  logic                          clk40,
  input  logic                          clk_fast,
  input  logic [NS-1:0][N_LINES-1:0]    px,
  input  vme_in_t                       vme,
  input  logic [4:0]                    ga,
  output logic [15:0]                   d_out,
  output logic                          d_oe,
  output logic [NS*N_LINES-1:0][TAP_W-1:0] taps
);
  timeunit 1ns; timeprecision 1ps;

  logic                 rst_n;
  slot_cfg_t [NS-1:0]   slot_cfg;
  logic                 clear_cmd, resync_cmd;
  logic [NS-1:0][CW-1:0] err_count;
  logic [NS-1:0]        locked;
  logic [NS-1:0]        rx_clk;

  fpga_vme_regs #(.NS(NS), .NL(N_LINES), .TW(TAP_W), .CW(CW)) u_regs (
    .clk(clk40), .vme(vme), .ga(ga), .d_out(d_out), .d_oe(d_oe), .rst_n(rst_n),
    .slot_cfg(slot_cfg), .taps(taps), .clear_cmd(clear_cmd), .resync_cmd(resync_cmd),
    .err_count(err_count), .locked(locked)
  );

  for (genvar s = 0; s < int'(NS); s++) begin : g_slot
    assign rx_clk[s] = slot_cfg[s].fwd_clk ? px[s][0] : clk_fast;

    slot_receiver #(.DES(DES), .ODD_PARITY(ODD_PARITY), .CW(CW)) u_rx (
      .rx_clk(rx_clk[s]), .lines(px[s]),
      .bus_clk(clk40), .bus_rst_n(rst_n), .cfg(slot_cfg[s]),
      .clear_cmd(clear_cmd), .resync_cmd(resync_cmd),
      .err_count(err_count[s]), .locked(locked[s])
    );
  end
endmodule
