// Bit error checker for one processor slot.
//
// Each sample carries 24 data bits on Px_1..Px_24 and, in global clock mode,
// a parity bit on Px_0.  The specification asks for parity checks and for
// comparison with a simple pattern, naming a binary counter (linear ramp) as
// the pattern of choice.  Both are done here on a whole deserialised frame of
// DES samples per cycle:
//   * parity: a sample whose 25 bits do not have the configured parity counts
//     as one bit error (parity cannot tell more);
//   * ramp: the data of successive samples must count up by one.  The checker
//     keeps its own expected value and counts every data bit that differs from
//     it, so a single flipped bit counts once.  While unlocked it loads the
//     expected value from the newest sample of a frame (plus one) and counts
//     nothing for that frame; a resync request unlocks it again.
// Parity is ignored in forwarded clock mode (par_en low), where Px_0 is a clock.
// The odd/even choice of parity and the lock procedure are this design's own.
//
// Timing: err_bits/err_valid are registered, one cycle after frame_valid.
module pattern_checker
  import bpt_pkg::*;
#(
  parameter int unsigned DES        = 8,
  parameter int unsigned DW         = 24,
  parameter bit          ODD_PARITY = 1'b1,
  localparam int unsigned EW        = $clog2(DES * DW + DES + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  chk_mode_e              mode,
  input  logic                   enable,
  input  logic                   par_en,
  input  logic                   resync,
  input  logic                   frame_valid,
  input  logic [DES-1:0][DW:0]   frame,      // [k][0] = Px_0, [k][DW:1] = data
  output logic [EW-1:0]          err_bits,
  output logic                   err_valid,
  output logic                   locked
);
  timeunit 1ns; timeprecision 1ps;

  logic [DW-1:0] expect_q;
  logic          chk_par, chk_ramp;
  logic [EW-1:0] par_errs, ramp_errs;

  assign chk_par  = enable && par_en && (mode == CHK_PARITY || mode == CHK_BOTH);
  assign chk_ramp = enable && (mode == CHK_RAMP || mode == CHK_BOTH);

  always_comb begin
    par_errs  = '0;
    ramp_errs = '0;
    for (int k = 0; k < int'(DES); k++) begin
      logic [DW-1:0] exp_k;
      logic [DW-1:0] diff;
      if ((^frame[k]) != ODD_PARITY) par_errs = par_errs + 1'b1;
      exp_k = expect_q + DW'(k);
      diff  = frame[k][DW:1] ^ exp_k;
      for (int b = 0; b < int'(DW); b++) ramp_errs = ramp_errs + EW'(diff[b]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      expect_q  <= '0;
      locked    <= 1'b0;
      err_bits  <= '0;
      err_valid <= 1'b0;
    end else begin
      err_valid <= 1'b0;
      err_bits  <= '0;
      if (resync || !chk_ramp) begin
        locked <= 1'b0;
      end
      if (frame_valid) begin
        err_valid <= chk_par || chk_ramp;
        err_bits  <= (chk_par ? par_errs : '0)
                   + ((chk_ramp && locked && !resync) ? ramp_errs : '0);
        if (chk_ramp && !resync) begin
          if (locked) expect_q <= expect_q + DW'(DES);
          else begin
            expect_q <= frame[DES-1][DW:1] + 1'b1;
            locked   <= 1'b1;
          end
        end
      end
    end
  end

endmodule
