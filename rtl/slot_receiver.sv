// Receive path of one processor slot: deserialiser, checker, error register.
//
// The 25 lines of a slot are sampled on rx_clk, which is either the global
// line-rate clock or the clock forwarded on the slot's own Px_0 (selected
// outside this module).  Configuration and the clear/resync commands come from
// the VME register file in the bus clock domain: the quasi-static
// configuration word passes through a two-stage synchroniser (it should only be
// changed while the slot is disabled), the commands cross as toggles.  The
// error count and the lock flag are returned to the bus clock domain.  The
// receive domain reset is asserted with the bus reset and released in step
// with rx_clk.  Parity checking is disabled automatically in forwarded clock
// mode.  The split into deserialiser, checker and counter follows the
// specification; the crossing scheme is this design's.
//
// Latency (not constrained by the specification): a sample reaches the error
// count after at most DES + 2 receive clock cycles plus the counter's copy
// delay into the bus domain.
module slot_receiver
  import bpt_pkg::*;
#(
  parameter int unsigned DES        = 8,
  parameter bit          ODD_PARITY = 1'b1,
  parameter int unsigned CW         = 32
) (
  input  logic                 rx_clk,
  input  logic [N_LINES-1:0]   lines,
  input  logic                 bus_clk,
  input  logic                 bus_rst_n,
  input  slot_cfg_t            cfg,
  input  logic                 clear_cmd,    // bus clock pulse
  input  logic                 resync_cmd,   // bus clock pulse
  output logic [CW-1:0]        err_count,    // bus clock domain
  output logic                 locked        // bus clock domain
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned EW = $clog2(DES * DATA_BITS + DES + 1);

  // ------------------------------------------------ bus side command toggles
  logic clr_tgl, rsy_tgl;
  logic [1:0] lock_sync;
  logic       rx_locked;

  always_ff @(posedge bus_clk or negedge bus_rst_n) begin
    if (!bus_rst_n) begin
      clr_tgl   <= 1'b0;
      rsy_tgl   <= 1'b0;
      lock_sync <= '0;
    end else begin
      if (clear_cmd)  clr_tgl <= ~clr_tgl;
      if (resync_cmd) rsy_tgl <= ~rsy_tgl;
      lock_sync <= {lock_sync[0], rx_locked};
    end
  end
  assign locked = lock_sync[1];

  // ------------------------------------------------------ receive side sync
  logic [1:0] rst_sync;
  logic       rx_rst_n;
  slot_cfg_t  cfg_s1, cfg_s2;
  logic [2:0] clr_s, rsy_s;
  logic       rx_clear, rx_resync;

  always_ff @(posedge rx_clk or negedge bus_rst_n) begin
    if (!bus_rst_n) rst_sync <= '0;
    else            rst_sync <= {rst_sync[0], 1'b1};
  end
  assign rx_rst_n = rst_sync[1];

  always_ff @(posedge rx_clk or negedge rx_rst_n) begin
    if (!rx_rst_n) begin
      cfg_s1 <= '0;
      cfg_s2 <= '0;
      clr_s  <= '0;
      rsy_s  <= '0;
    end else begin
      cfg_s1 <= cfg;
      cfg_s2 <= cfg_s1;
      clr_s  <= {clr_s[1:0], clr_tgl};
      rsy_s  <= {rsy_s[1:0], rsy_tgl};
    end
  end
  assign rx_clear  = clr_s[2] ^ clr_s[1];
  assign rx_resync = rsy_s[2] ^ rsy_s[1];

  // ------------------------------------------------------------ data path
  logic [DES-1:0][N_LINES-1:0] frame;
  logic                        frame_valid;
  logic [EW-1:0]               err_bits;
  logic                        err_valid;

  line_deserializer #(.W(N_LINES), .DES(DES)) u_des (
    .clk(rx_clk), .rst_n(rx_rst_n), .din(lines),
    .frame(frame), .frame_valid(frame_valid)
  );

  pattern_checker #(.DES(DES), .DW(DATA_BITS), .ODD_PARITY(ODD_PARITY)) u_chk (
    .clk(rx_clk), .rst_n(rx_rst_n),
    .mode(cfg_s2.mode), .enable(cfg_s2.enable), .par_en(!cfg_s2.fwd_clk),
    .resync(rx_resync), .frame_valid(frame_valid), .frame(frame),
    .err_bits(err_bits), .err_valid(err_valid), .locked(rx_locked)
  );

  error_counter #(.W(CW), .IN_W(EW)) u_cnt (
    .rx_clk(rx_clk), .rx_rst_n(rx_rst_n), .clear(rx_clear),
    .inc_valid(err_valid), .inc(err_bits),
    .bus_clk(bus_clk), .bus_rst_n(bus_rst_n), .count(err_count)
  );
endmodule
