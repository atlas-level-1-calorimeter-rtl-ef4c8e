// End-to-end testbench of the backplane tester at its default size: 16
// processor slots of 25 lines at 320 Mb/s, 40 MHz VME clock.
//
// Each slot sends its own counter pattern, launched on the falling edge of the
// 320 MHz clock.  Slots are configured in turn for parity only, ramp only,
// both, and both with a forwarded clock on Px_0.  Random single bit flips are
// injected and the error registers read over VME must equal the injected
// errors (per the rules of each mode).  One line (slot 5, Px_7) is launched
// 1.8 ns early so that it is sampled one bit ahead; a delay scan over its
// input delay taps must find a window without errors, and with the tap in its
// middle the slot must run clean.  Also exercised: lock and resync, counter
// clear, DTACK* for CPLD and FPGA addresses and none for another slot, the
// configuration path through the CPLD, an FPGA that stays off the bus until
// it reports configuration done, and the clock extracted from a TTC
// stream.  Every mechanism is counted and must have happened at least once.
module tb_backplane_tester;
  import bpt_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int  NS = N_SLOTS;
  localparam real T  = 3.125;          // 320 Mb/s bit time
  localparam int  SKEW_SLOT = 5, SKEW_LINE = 7;

  logic clk40 = 0, clk_fast = 0, clk_skew = 0;
  logic ttc_in = 0, ttc_clk_recovered;
  logic [NS-1:0][N_LINES-1:0] px;
  vme_in_t vme;
  logic [4:0] ga = 5'd20;
  logic vme_dtack_n, vme_d_oe;
  logic [15:0] vme_d_out;
  logic cfg_prog_b, cfg_csi_b, cfg_rdwr_b, cfg_cclk;
  logic [15:0] cfg_d;
  logic cfg_init_b = 1'b1, cfg_done = 1'b0;
  int checks = 0, failures = 0;

  backplane_tester dut (.*);

  logic dtack_n;
  logic [15:0] rd_bus;
  assign dtack_n = vme_dtack_n;
  assign rd_bus  = vme_d_oe ? vme_d_out : 16'hDEAD;

  always #(T / 2.0) clk_fast = ~clk_fast;
  always #12.5      clk40    = ~clk40;
  always @(clk_fast) clk_skew <= #1.325 clk_fast;
  // TTC: a transition at every 12.5 ns cell boundary (data all zero)
  always #12.5      ttc_in   = ~ttc_in;

  `include "vme_master.svh"

  // ------------------------------------------------------------ transmitters
  chk_mode_e    mode_of [NS];
  bit           fwd_of  [NS];
  logic [23:0]  ctr     [NS];
  int           exp_par [NS], exp_ramp [NS];
  int           flip_rate = 0;
  int           n_flips = 0;

  initial for (int s = 0; s < NS; s++) begin
    ctr[s]     = 24'($urandom);
    mode_of[s] = chk_mode_e'(s % 4 == 0 ? CHK_PARITY : s % 4 == 1 ? CHK_RAMP : CHK_BOTH);
    fwd_of[s]  = (s % 4 == 3);
    exp_par[s] = 0; exp_ramp[s] = 0;
  end

  always @(negedge clk_fast) begin
    for (int s = 0; s < NS; s++) begin
      logic [N_LINES-1:0] w;
      w = {ctr[s], ~(^ctr[s])};
      ctr[s] = ctr[s] + 1'b1;
      if (flip_rate != 0 && s != SKEW_SLOT && $urandom_range(flip_rate - 1) == 0) begin
        int b;
        b = fwd_of[s] ? $urandom_range(24, 1) : $urandom_range(24);
        w[b] = ~w[b];
        if (b != 0) exp_ramp[s]++;
        exp_par[s]++;
        n_flips++;
      end
      for (int l = 0; l < N_LINES; l++) begin
        if (fwd_of[s] && l == 0) continue;
        if (s == SKEW_SLOT && l == SKEW_LINE) continue;
        px[s][l] <= w[l];
      end
    end
  end
  // the early line: shows the next word 1.8 ns before the other lines do
  always @(negedge clk_skew) px[SKEW_SLOT][SKEW_LINE] <= ctr[SKEW_SLOT][SKEW_LINE - 1];
  // forwarded clocks
  always @(clk_fast) for (int s = 0; s < NS; s++) if (fwd_of[s]) px[s][0] = clk_fast;

  // ------------------------------------------------------------- monitors
  int cclk_pulses = 0;
  logic [15:0] cclk_last;
  always @(posedge cfg_cclk) begin cclk_pulses++; cclk_last = cfg_d; end

  realtime ttc_last = 0; int ttc_periods = 0, ttc_bad = 0;
  always @(posedge ttc_clk_recovered) begin
    if (ttc_last > 0) begin
      ttc_periods++;
      if ($realtime - ttc_last < 24.99 || $realtime - ttc_last > 25.01) ttc_bad++;
    end
    ttc_last = $realtime;
  end

  // mechanism counters
  int m_parity = 0, m_ramp = 0, m_both = 0, m_fwd = 0, m_lock = 0, m_resync = 0,
      m_clear = 0, m_scan = 0, m_deskew = 0, m_cfg = 0, m_dtack_cpld = 0,
      m_dtack_fpga = 0, m_foreign = 0, m_ttc = 0, m_unconf = 0;

  function automatic logic [23:0] ma(input logic [18:0] off);
    return {ga, off};
  endfunction

  task automatic read_err(input int s, output logic [31:0] v);
    logic [15:0] lo, hi;
    vme_read(ma(A_ERR + 19'(4*s)), lo);
    vme_read(ma(A_ERR + 19'(4*s + 2)), hi);
    v = {hi, lo};
  endtask

  task automatic ctrl(input logic [15:0] v);
    vme_write(ma(A_CTRL), v);
  endtask

  logic [15:0] r;
  logic [31:0] e;
  int cyc; bit ack;
  int scan_err [64];
  int win_lo, win_hi, best;

  initial begin
    vme = '{sysreset_n: 1'b0, a: '0, d: '0, ds0_n: 1'b1, write_n: 1'b1};
    px  = '0;
    repeat (4) @(posedge clk40);
    vme.sysreset_n = 1;
    repeat (4) @(posedge clk40);
    bus_armed = 1;

    // -------------------------------------------------------- bus basics
    vme_access(ma(A_CPLD_ID), 0, 0, r, cyc, ack);
    checks++; if (!ack || r !== CPLD_ID) begin failures++; $display("CPLD id %h", r); end
    else m_dtack_cpld++;
    // FPGA not yet configured: the CPLD still terminates the access, but
    // nothing drives the data bus
    vme_access(ma(A_FW_ID), 0, 0, r, cyc, ack);
    checks++; if (!ack || r !== 16'hDEAD) begin failures++; $display("unconfigured FPGA %h", r); end
    else m_unconf++;
    cfg_done = 1'b1;
    repeat (4) @(posedge clk40);
    vme_access(ma(A_FW_ID), 0, 0, r, cyc, ack);
    checks++; if (!ack || r !== FW_ID) begin failures++; $display("FPGA id %h", r); end
    else m_dtack_fpga++;
    vme_access({5'd21, A_FW_ID}, 0, 0, r, cyc, ack);
    checks++; if (ack) begin failures++; $display("answered for slot 21"); end
    else m_foreign++;

    // ------------------------------------------- configuration through CPLD
    vme_write(ma(A_CFG_CTRL), 16'h0003);
    checks++; if (cfg_prog_b !== 0 || cfg_csi_b !== 0) begin failures++; $display("config control"); end
    vme_write(ma(A_CFG_CTRL), 16'h0002);
    for (int i = 0; i < 4; i++) begin
      logic [15:0] w;
      int n0;
      w = 16'($urandom); n0 = cclk_pulses;
      vme_write(ma(A_CFG_DATA), w);
      checks++;
      if (cclk_pulses != n0 + 1 || cclk_last !== w) begin failures++; $display("config word %h", w); end
      else m_cfg++;
    end
    vme_expect(ma(A_CFG_STAT), 16'h0003, "config status");

    // ---------------------------------------------------- slot set-up
    for (int s = 0; s < NS; s++)
      vme_write(ma(A_SLOT_CFG + 19'(2*s)),
                {12'h0, 1'b1, 1'(fwd_of[s]), 2'(mode_of[s])});
    repeat (40) @(posedge clk40);
    ctrl(16'h0002); m_resync++;
    repeat (40) @(posedge clk40);
    vme_read(ma(A_LOCK), r);
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (r[s] != (mode_of[s] != CHK_PARITY)) begin failures++; $display("slot %0d lock %0b", s, r[s]); end
      else if (r[s]) m_lock++;
    end

    // ------------------------------------- error injection and readout
    ctrl(16'h0001); m_clear++;
    repeat (10) @(posedge clk40);
    for (int s = 0; s < NS; s++) begin exp_par[s] = 0; exp_ramp[s] = 0; end
    @(negedge clk_fast) flip_rate = 40;
    repeat (80) @(posedge clk40);          // 2 us, 640 samples per slot
    @(negedge clk_fast) flip_rate = 0;
    repeat (20) @(posedge clk40);
    for (int s = 0; s < NS; s++) begin
      int want;
      if (s == SKEW_SLOT) continue;
      want = fwd_of[s] ? exp_ramp[s]
           : mode_of[s] == CHK_PARITY ? exp_par[s]
           : mode_of[s] == CHK_RAMP   ? exp_ramp[s]
           : exp_par[s] + exp_ramp[s];
      read_err(s, e);
      checks++;
      if (e != 32'(want) || want == 0) begin
        failures++; $display("slot %0d: %0d errors counted, %0d injected", s, e, want);
      end else begin
        if (fwd_of[s]) m_fwd++;
        else if (mode_of[s] == CHK_PARITY) m_parity++;
        else if (mode_of[s] == CHK_RAMP) m_ramp++;
        else m_both++;
      end
    end
    // the skewed line makes errors in its slot
    read_err(SKEW_SLOT, e);
    checks++; if (e == 0) begin failures++; $display("skewed line made no errors"); end

    // clear
    ctrl(16'h0001); m_clear++;
    repeat (20) @(posedge clk40);
    read_err(0, e);
    checks++; if (e != 0) begin failures++; $display("slot 0 after clear: %0d", e); end

    // ------------------------------------------------ delay scan, slot 5 Px_7
    for (int t = 0; t < 64; t += 3) begin
      vme_write(ma(A_DELAY + 19'(2 * (SKEW_SLOT * N_LINES + SKEW_LINE))), 16'(t));
      repeat (4) @(posedge clk40);
      ctrl(16'h0002);
      repeat (8) @(posedge clk40);
      ctrl(16'h0001);
      repeat (30) @(posedge clk40);
      read_err(SKEW_SLOT, e);
      scan_err[t] = int'(e);
      m_scan++;
    end
    win_lo = -1; win_hi = -1;
    for (int t = 0; t < 64; t += 3) if (scan_err[t] == 0) begin
      if (win_lo < 0) win_lo = t;
      win_hi = t;
    end
    $display("delay scan: zero-error taps %0d..%0d", win_lo, win_hi);
    // the early line's eye lies between 0.24 and 3.36 ns of added delay
    checks++;
    if (win_lo < 3 || win_lo > 6 || win_hi < 39 || win_hi > 45 || scan_err[0] == 0) begin
      failures++; $display("unexpected window");
    end
    best = (win_lo + win_hi) / 2;
    vme_write(ma(A_DELAY + 19'(2 * (SKEW_SLOT * N_LINES + SKEW_LINE))), 16'(best));
    vme_expect(ma(A_DELAY + 19'(2 * (SKEW_SLOT * N_LINES + SKEW_LINE))), 16'(best), "tap readback");
    ctrl(16'h0002);
    repeat (8) @(posedge clk40);
    ctrl(16'h0001);
    repeat (80) @(posedge clk40);
    read_err(SKEW_SLOT, e);
    checks++; if (e != 0 || win_lo < 0) begin failures++; $display("after deskew: %0d errors", e); end
    else m_deskew++;

    // ---------------------------------------------------------- TTC clock
    checks++;
    if (ttc_periods < 100 || ttc_bad != 0) begin
      failures++; $display("TTC clock: %0d periods, %0d wrong", ttc_periods, ttc_bad);
    end else m_ttc++;

    // ------------------------------------------------------ mechanism tally
    $display("mechanisms: parity %0d ramp %0d both %0d fwd %0d lock %0d resync %0d clear %0d",
             m_parity, m_ramp, m_both, m_fwd, m_lock, m_resync, m_clear);
    $display("            scan %0d deskew %0d cfg %0d dtack cpld %0d fpga %0d foreign %0d ttc %0d unconfigured %0d flips %0d",
             m_scan, m_deskew, m_cfg, m_dtack_cpld, m_dtack_fpga, m_foreign, m_ttc, m_unconf, n_flips);
    begin
      int m [15];
      m = '{m_parity, m_ramp, m_both, m_fwd, m_lock, m_resync, m_clear, m_scan, m_deskew,
            m_cfg, m_dtack_cpld, m_dtack_fpga, m_foreign, m_ttc, m_unconf};
      for (int i = 0; i < 15; i++) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400us;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
