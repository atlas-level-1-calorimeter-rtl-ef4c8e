// VME register file of the processor FPGA.
//
// The specification routes the full VME bus to the FPGA, which after
// configuration carries the complete VME interface (A24/D16, synchronous to
// the 40 MHz clock); the CPLD supplies DTACK*.  Through it software sets up
// each slot, sets the input delay of every line (the delay scan used to
// deskew the inputs) and reads the per-channel error registers.  Offsets at
// and above FPGA_BASE belong to the FPGA (see bpt_pkg):
//   FW_ID              firmware identifier
//   CTRL      (write)  [0] clear all error counters, [1] resync all checkers
//   LOCK               [N_SLOTS-1:0] checker lock flags
//   SLOT_CFG + 2*s     slot_cfg_t {enable, fwd_clk, mode[1:0]}
//   ERR + 4*s          error count bits 15:0; reading it latches bits 31:16
//   ERR + 4*s + 2      the latched bits 31:16
//   DELAY + 2*l        delay tap of line l = 25*slot + Px index
// The register map, the latching of the upper half and the reset values
// (all slots disabled, all taps zero) are this design's choices.
//
// Timing: read data is registered in the cycle after the access is
// recognised and driven while DS0* stays asserted; commands are one-cycle
// pulses in that same cycle.
module fpga_vme_regs
  import bpt_pkg::*;
#(
  parameter int unsigned NS = 16,
  parameter int unsigned NL = 25,
  parameter int unsigned TW = 6,
  parameter int unsigned CW = 32
) (
  input  logic                     clk,
  input  vme_in_t                  vme,
  input  logic [4:0]               ga,
  output logic [15:0]              d_out,
  output logic                     d_oe,
  output logic                     rst_n,
  output slot_cfg_t [NS-1:0]       slot_cfg,
  output logic [NS*NL-1:0][TW-1:0] taps,
  output logic                     clear_cmd,
  output logic                     resync_cmd,
  input  logic [NS-1:0][CW-1:0]    err_count,
  input  logic [NS-1:0]            locked
);
  timeunit 1ns; timeprecision 1ps;

  logic        start, active, write;
  logic [18:0] offset;
  logic [15:0] wdata;

  vme_slave_sync u_sync (
    .clk(clk), .vme(vme), .ga(ga), .rst_n(rst_n), .start(start),
    .active(active), .offset(offset), .wdata(wdata), .write(write)
  );

  // decode the captured offset in the cycle after start
  logic        start_q;
  logic        own_q;
  logic [15:0] err_hi_q;

  localparam int unsigned NLINES = NS * NL;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      start_q    <= 1'b0;
      own_q      <= 1'b0;
      d_out      <= '0;
      slot_cfg   <= '0;
      taps       <= '0;
      clear_cmd  <= 1'b0;
      resync_cmd <= 1'b0;
      err_hi_q   <= '0;
    end else begin
      start_q    <= start;
      clear_cmd  <= 1'b0;
      resync_cmd <= 1'b0;
      if (start_q) begin
        own_q <= (offset >= FPGA_BASE);
        d_out <= '0;
        if (offset == A_FW_ID && !write) d_out <= FW_ID;
        if (offset == A_CTRL && write) begin
          clear_cmd  <= wdata[0];
          resync_cmd <= wdata[1];
        end
        if (offset == A_LOCK && !write) d_out <= 16'(locked);
        for (int s = 0; s < int'(NS); s++) begin
          if (offset == A_SLOT_CFG + 19'(2*s)) begin
            if (write) slot_cfg[s] <= slot_cfg_t'(wdata[3:0]);
            else       d_out       <= {12'd0, slot_cfg[s]};
          end
          if (!write) begin
            if (offset == A_ERR + 19'(4*s)) begin
              d_out    <= 16'(err_count[s]);
              err_hi_q <= 16'(err_count[s] >> 16);
            end
            if (offset == A_ERR + 19'(4*s + 2)) d_out <= err_hi_q;
          end
        end
        if (offset >= A_DELAY && offset < A_DELAY + 19'(2*NLINES)) begin
          if (write) taps[(offset - A_DELAY) >> 1] <= wdata[TW-1:0];
          else       d_out <= 16'(taps[(offset - A_DELAY) >> 1]);
        end
      end
      if (!active) own_q <= 1'b0;
    end
  end

  assign d_oe = active && own_q && !write;
endmodule
