// Shared types and constants of the backplane tester.
//
// The tester receives 25 single-ended lines from each of up to 16 processor
// modules (CPMs or JEMs) in a crate and counts bit errors on them.  Line 0 of a
// slot is either a parity bit (global clock mode) or a clock forwarded by the
// sender (source-synchronous mode); lines 1..24 carry 24 data bits.  The VME
// bus is the reduced A24/D16 set of 43 signals.  Slot count, line count, data
// width and the VME signal set follow the specification; the register map, the
// deserialisation factor, the counter width and the delay tap width are this
// design's choices.
package bpt_pkg;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned N_SLOTS   = 16;   // processor modules per crate
  localparam int unsigned N_LINES   = 25;   // Px_0 .. Px_24
  localparam int unsigned DATA_BITS = 24;   // Px_1 .. Px_24
  localparam int unsigned DESER     = 8;    // 320 Mb/s deserialised to 40 MHz frames
  localparam int unsigned TAP_W     = 6;    // 64-tap input delay
  localparam int unsigned CNT_W     = 32;   // error counter width

  // What a slot's checker compares.
  typedef enum logic [1:0] {
    CHK_OFF    = 2'd0,
    CHK_PARITY = 2'd1,
    CHK_RAMP   = 2'd2,
    CHK_BOTH   = 2'd3
  } chk_mode_e;

  // Per-slot configuration register.
  typedef struct packed {
    logic      enable;   // checker runs
    logic      fwd_clk;  // 1: Px_0 is a forwarded clock, 0: global clock, Px_0 = parity
    chk_mode_e mode;
  } slot_cfg_t;

  // VME signals of the reduced bus as seen through the input buffers.
  // Active-low signals keep their bus polarity.
  typedef struct packed {
    logic        sysreset_n;
    logic [23:1] a;
    logic [15:0] d;
    logic        ds0_n;
    logic        write_n;
  } vme_in_t;

  // ---------------------------------------------------------------- address map
  // A module owns 512 KiB of A24 space: A[23:19] equal to its geographic address.
  // Byte offsets within that window (A[18:1] select a 16-bit word):
  localparam logic [18:0] CPLD_TOP     = 19'h00100; // below: CPLD registers
  localparam logic [18:0] A_CPLD_ID    = 19'h00000; // R   module identifier
  localparam logic [18:0] A_CFG_CTRL   = 19'h00002; // RW  [0] PROG asserted, [1] SelectMAP chip select
  localparam logic [18:0] A_CFG_STAT   = 19'h00004; // R   [0] INIT_B, [1] DONE
  localparam logic [18:0] A_CFG_DATA   = 19'h00006; // W   configuration word, one CCLK pulse
  localparam logic [18:0] A_CPLD_GA    = 19'h00008; // R   geographic address

  localparam logic [18:0] FPGA_BASE    = 19'h01000; // from here: FPGA registers
  localparam logic [18:0] A_FW_ID      = 19'h01000; // R   firmware identifier
  localparam logic [18:0] A_CTRL       = 19'h01002; // W   [0] clear error counters, [1] resync checkers
  localparam logic [18:0] A_LOCK       = 19'h01004; // R   one lock bit per slot
  localparam logic [18:0] A_SLOT_CFG   = 19'h01100; // RW  + 2*slot: slot_cfg_t
  localparam logic [18:0] A_ERR        = 19'h01200; // R   + 4*slot: low half (latches high), +2: high half
  localparam logic [18:0] A_DELAY      = 19'h02000; // RW  + 2*(25*slot+line): delay tap

  localparam logic [15:0] CPLD_ID      = 16'hB7C1;
  localparam logic [15:0] FW_ID        = 16'hB7F1;
endpackage
