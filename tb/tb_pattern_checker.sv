// Testbench for pattern_checker: frames of a counter pattern with odd parity
// on Px_0, with known bit flips injected.  Expected error counts come from the
// injected flips, not from the pattern: ramp errors = flipped data bits,
// parity errors = samples with an odd number of flips.  Covers all four
// modes, the lock on the first frame, resync, parity masking (par_en low) and
// the one-cycle latency.
module tb_pattern_checker;
  import bpt_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int DES = 8, DW = 24;
  localparam int EW = $clog2(DES * DW + DES + 1);

  logic clk = 0, rst_n = 0;
  chk_mode_e mode;
  logic enable, par_en, resync, frame_valid;
  logic [DES-1:0][DW:0] frame;
  logic [EW-1:0] err_bits;
  logic err_valid, locked;
  int checks = 0, failures = 0;

  pattern_checker #(.DES(DES), .DW(DW), .ODD_PARITY(1'b1)) dut (.*);

  always #2 clk = ~clk;

  logic [DW-1:0] ctr;

  function automatic logic [DW:0] encode(logic [DW-1:0] d);
    return {d, ~(^d)};   // odd parity over all 25 bits
  endfunction

  // drive one frame; nflip random flips unless nflip = 0; returns expected
  // parity and ramp error counts
  task automatic send(input int nflip, output int exp_par, output int exp_ramp);
    logic [DES-1:0][DW:0] f;
    int fl [DES];
    exp_par = 0; exp_ramp = 0;
    for (int k = 0; k < DES; k++) begin
      f[k] = encode(ctr);
      ctr++;
      fl[k] = 0;
    end
    for (int n = 0; n < nflip; n++) begin
      int k, b;
      k = $urandom_range(DES - 1);
      b = $urandom_range(DW);
      if (f[k][b] == encode(ctr - DW'(DES - k))[b]) begin   // flip each bit once only
        f[k][b] = ~f[k][b];
        fl[k]++;
        if (b != 0) exp_ramp++;
      end
    end
    for (int k = 0; k < DES; k++) if (fl[k] % 2) exp_par++;
    @(negedge clk);
    frame = f; frame_valid = 1;
    @(negedge clk);
    frame_valid = 0;
  endtask

  task automatic expect_errs(input int want, input string what);
    // err_valid comes one cycle after frame_valid: the edge before this negedge
    checks++;
    if (!err_valid || int'(err_bits) != want) begin
      failures++;
      $display("%s: err_valid=%0b err_bits=%0d want %0d", what, err_valid, err_bits, want);
    end
  endtask

  // a frame cannot hold more errors than bits; nothing without err_valid
  a_err_range: assert property (@(posedge clk) disable iff (!rst_n)
    err_valid |-> int'(err_bits) <= DES * (DW + 1))
    else begin failures++; $display("err_bits %0d out of range", err_bits); end
  a_err_quiet: assert property (@(posedge clk) disable iff (!rst_n)
    !err_valid |-> err_bits == '0)
    else begin failures++; $display("err_bits without err_valid"); end

  int p, r;
  initial begin
    mode = CHK_OFF; enable = 0; par_en = 1; resync = 0; frame_valid = 0; frame = '0;
    ctr = 24'hFFFFF0;   // wraps through zero during the test
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ramp: first frame locks, counts nothing even with flips after it
    mode = CHK_RAMP; enable = 1;
    send(0, p, r); expect_errs(0, "lock frame");
    checks++; if (!locked) begin failures++; $display("not locked"); end
    for (int i = 0; i < 40; i++) begin
      send($urandom_range(6), p, r); expect_errs(r, "ramp");
    end
    // a jump in the pattern is counted bit by bit until a resync
    ctr = ctr + 24'd1000;
    send(0, p, r);
    checks++; if (err_bits == 0) begin failures++; $display("jump not seen"); end
    @(negedge clk); resync = 1; @(negedge clk); resync = 0;
    checks++; if (locked) begin failures++; $display("still locked after resync"); end
    send(0, p, r); expect_errs(0, "relock frame");
    send(3, p, r); expect_errs(r, "after relock");

    // parity only
    mode = CHK_PARITY;
    for (int i = 0; i < 30; i++) begin
      send($urandom_range(5), p, r); expect_errs(p, "parity");
    end
    checks++; if (locked) begin failures++; $display("locked in parity mode"); end

    // both: lock frame counts parity only
    mode = CHK_BOTH;
    send(0, p, r); expect_errs(0, "both lock");
    for (int i = 0; i < 30; i++) begin
      send($urandom_range(5), p, r); expect_errs(p + r, "both");
    end

    // forwarded clock: Px_0 is no parity bit
    par_en = 0;
    for (int i = 0; i < 10; i++) begin
      send($urandom_range(5), p, r); expect_errs(r, "both, no parity");
    end

    // disabled / off: nothing reported
    mode = CHK_OFF; par_en = 1;
    send(4, p, r);
    checks++; if (err_valid) begin failures++; $display("valid while off"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
