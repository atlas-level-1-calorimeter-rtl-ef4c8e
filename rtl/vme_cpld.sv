// Basic VME access CPLD.
//
// Follows the specification: the CPLD sees a reduced VME bus (SYSRESET*,
// A[23:1], D[15:0], DS0*, WRITE*, DTACK*; A24/D16), reads the module's
// geographic address to place it in A24 space like a merger module, and
// terminates every access to the module's address space with DTACK*, whether
// the FPGA is configured or not.  It also gives VME a route for loading the
// FPGA directly over the FPGA's parallel (SelectMAP) configuration port.
//
// This design's choices: DTACK* is driven ACK_DLY clock cycles after the
// access is recognised (so that the FPGA, which decodes the same bus with the
// same synchroniser, has its read data on the bus by then) and held until
// DS0* is released; the CPLD answers offsets below CPLD_TOP itself:
//   CPLD_ID   module identifier        CFG_CTRL  [0] PROG, [1] chip select
//   CFG_STAT  [0] INIT_B, [1] DONE     CFG_DATA  16-bit configuration word
//   CPLD_GA   geographic address
// A write to CFG_DATA puts the word on cfg_d and gives one CCLK pulse one
// cycle later (a 16-bit SelectMAP write).  The FPGA receives the
// geographic address through fpga_ga.
module vme_cpld
  import bpt_pkg::*;
#(
  parameter int unsigned ACK_DLY = 3
) (
  input  logic        clk,
  input  vme_in_t     vme,
  input  logic [4:0]  ga,
  output logic        dtack_n,
  output logic [15:0] d_out,
  output logic        d_oe,
  output logic [4:0]  fpga_ga,
  // FPGA parallel configuration port
  output logic        cfg_prog_b,
  output logic        cfg_csi_b,
  output logic        cfg_rdwr_b,
  output logic        cfg_cclk,
  output logic [15:0] cfg_d,
  input  logic        cfg_init_b,
  input  logic        cfg_done
);
  timeunit 1ns; timeprecision 1ps;

  logic        rst_n, start, active, write;
  logic [18:0] offset;
  logic [15:0] wdata;

  vme_slave_sync u_sync (
    .clk(clk), .vme(vme), .ga(ga), .rst_n(rst_n), .start(start),
    .active(active), .offset(offset), .wdata(wdata), .write(write)
  );

  localparam int unsigned DW = $clog2(ACK_DLY + 1);

  logic [DW-1:0] dly_q;
  logic          own_q;        // access targets the CPLD registers
  logic [1:0]    ctrl_q;
  logic          cclk_pend;
  logic [1:0]    init_s, done_s;
  logic [18:0]   a_now;

  assign a_now = {vme.a[18:1], 1'b0};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dly_q     <= '0;
      dtack_n   <= 1'b1;
      own_q     <= 1'b0;
      ctrl_q    <= '0;
      cfg_d     <= '0;
      cfg_cclk  <= 1'b0;
      cclk_pend <= 1'b0;
      d_out     <= '0;
      init_s    <= '0;
      done_s    <= '0;
      fpga_ga   <= '0;
    end else begin
      init_s   <= {init_s[0], cfg_init_b};
      done_s   <= {done_s[0], cfg_done};
      fpga_ga  <= ga;
      cfg_cclk <= cclk_pend;
      cclk_pend <= 1'b0;

      if (start) begin
        dly_q <= DW'(ACK_DLY);
        own_q <= (a_now < CPLD_TOP);
        if (a_now < CPLD_TOP) begin
          if (!vme.write_n) begin
            if (a_now == A_CFG_CTRL) ctrl_q <= vme.d[1:0];
            if (a_now == A_CFG_DATA) begin
              cfg_d     <= vme.d;
              cclk_pend <= 1'b1;
            end
          end
          unique case (a_now)
            A_CPLD_ID:  d_out <= CPLD_ID;
            A_CFG_CTRL: d_out <= {14'd0, ctrl_q};
            A_CFG_STAT: d_out <= {14'd0, done_s[1], init_s[1]};
            A_CPLD_GA:  d_out <= {11'd0, ga};
            default:    d_out <= '0;
          endcase
        end
      end else if (active && dly_q != '0) begin
        dly_q <= dly_q - 1'b1;
        if (dly_q == DW'(1)) dtack_n <= 1'b0;
      end

      if (!active && !start) begin
        dtack_n <= 1'b1;
        dly_q   <= '0;
      end
    end
  end

  assign d_oe       = active && own_q && !write;
  assign cfg_prog_b = !ctrl_q[0];
  assign cfg_csi_b  = !ctrl_q[1];
  assign cfg_rdwr_b = 1'b0;

  // unused bits of the captured access
  logic unused;
  assign unused = ^{offset, wdata};
endmodule
