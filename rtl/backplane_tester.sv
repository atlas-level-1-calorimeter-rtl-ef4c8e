// Backplane tester module: board-level top.
//
// The module sits in a merger (CMM) slot of a processor crate and measures
// bit error rates on the merger lines of the backplane: 25 lines from each of
// up to 16 processor modules (400 inputs).  Every line passes a programmable
// delay in the FPGA pad, is sampled and deserialised, and is checked against
// parity and a counter (ramp) pattern; bit errors are accumulated per slot and
// read over VME.  Basic VME access (address decoding from the geographic
// address, DTACK*, FPGA configuration over VME) is in a CPLD, the rest in the
// FPGA.  The TTC line signal is reduced to a clock by an XOR edge detector and
// a divider; the PLLs, jitter cleaner, clock multiplexer/fan-out, crystal,
// bus buffers, flash and System ACE are outside this model, so their signals
// are ports: ttc_clk_recovered leaves for the jitter cleaner, clk40 and
// clk_fast come back from the clock fan-out, the configuration port goes to
// the FPGA's configuration logic.
//
// The VME data bus is split into d_in (inside vme), vme_d_out and vme_d_oe;
// DTACK* is driven by the CPLD only.  Read data come from the CPLD for
// offsets below CPLD_TOP and from the FPGA above.  The CPLD serves the bus
// from power-up; the FPGA's VME interface only exists once the FPGA is
// configured, so here the FPGA is held in reset and kept off the data bus
// while cfg_done is low (the specification's "after configuration"; holding
// it in reset is this design's way of modelling an unconfigured device).
module backplane_tester
  import bpt_pkg::*;
#(
  parameter int unsigned NS         = N_SLOTS,
  parameter int unsigned DES        = DESER,
  parameter bit          ODD_PARITY = 1'b1,
  parameter int unsigned TAP_PS     = 78
) (
  input  logic                       clk40,
  input  logic                       clk_fast,
  input  logic                       ttc_in,
  output logic                       ttc_clk_recovered,
  input  logic [NS-1:0][N_LINES-1:0] px,
  input  vme_in_t                    vme,
  input  logic [4:0]                 ga,
  output logic                       vme_dtack_n,
  output logic [15:0]                vme_d_out,
  output logic                       vme_d_oe,
  output logic                       cfg_prog_b,
  output logic                       cfg_csi_b,
  output logic                       cfg_rdwr_b,
  output logic                       cfg_cclk,
  output logic [15:0]                cfg_d,
  input  logic                       cfg_init_b,
  input  logic                       cfg_done
);
  timeunit 1ns; timeprecision 1ps;

  logic [15:0] cpld_d, fpga_d;
  logic        cpld_oe, fpga_oe;
  logic [4:0]  fpga_ga;
  logic [NS*N_LINES-1:0][TAP_W-1:0] taps;
  logic [NS-1:0][N_LINES-1:0]       px_dly;
  logic        ttc_edge;

  ttc_clock_recovery #(.DIV(2)) u_ttc (
    .ttc_in(ttc_in), .edge_pulse(ttc_edge), .clk_out(ttc_clk_recovered)
  );

  vme_cpld u_cpld (
    .clk(clk40), .vme(vme), .ga(ga), .dtack_n(vme_dtack_n),
    .d_out(cpld_d), .d_oe(cpld_oe), .fpga_ga(fpga_ga),
    .cfg_prog_b(cfg_prog_b), .cfg_csi_b(cfg_csi_b), .cfg_rdwr_b(cfg_rdwr_b),
    .cfg_cclk(cfg_cclk), .cfg_d(cfg_d), .cfg_init_b(cfg_init_b), .cfg_done(cfg_done)
  );

  for (genvar s = 0; s < int'(NS); s++) begin : g_slot
    for (genvar l = 0; l < int'(N_LINES); l++) begin : g_line
      input_delay #(.TW(TAP_W), .TAP_PS(TAP_PS)) u_dly (
        .din(px[s][l]), .tap(taps[s*N_LINES + l]), .dout(px_dly[s][l])
      );
    end
  end

  // an unconfigured FPGA sees SYSRESET* asserted
  vme_in_t vme_fpga;
  always_comb begin
    vme_fpga            = vme;
    vme_fpga.sysreset_n = vme.sysreset_n && cfg_done;
  end

  bpt_fpga #(.NS(NS), .DES(DES), .ODD_PARITY(ODD_PARITY), .CW(CNT_W)) u_fpga (
    .clk40(clk40), .clk_fast(clk_fast), .px(px_dly), .vme(vme_fpga), .ga(fpga_ga),
    .d_out(fpga_d), .d_oe(fpga_oe), .taps(taps)
  );

  assign vme_d_oe  = cpld_oe || (fpga_oe && cfg_done);
  assign vme_d_out = cpld_oe ? cpld_d : ((fpga_oe && cfg_done) ? fpga_d : 16'h0000);

  // the edge pulse train is an internal node of the clock extractor
  logic unused_ttc;
  assign unused_ttc = ttc_edge;
endmodule
