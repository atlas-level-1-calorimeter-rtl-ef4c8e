// VME slave front end shared by the CPLD and the FPGA register files.
//
// The bus is operated synchronously to the 40 MHz clock.  The data strobe
// DS0* and SYSRESET* pass through two-stage synchronisers; when a falling
// DS0* is seen and A[23:19] equals the module's geographic address, start
// pulses for one cycle and address, write data and direction are captured
// (they were valid on the bus before DS0* fell).  active stays high until
// DS0* is released.  Offsets are byte offsets inside the module's 512 KiB
// window.  The window size and the use of A[23:19] are this design's choice.
// rst_n is SYSRESET* after the synchroniser; it also serves as the
// asynchronous reset of the receive clock domains, where it is synchronised
// again, which is why lint reports it as used both ways.
module vme_slave_sync
  import bpt_pkg::*;
(
  input  logic        clk,
  input  vme_in_t     vme,
  input  logic [4:0]  ga,
  output logic        rst_n,
  output logic        start,
  output logic        active,
  output logic [18:0] offset,
  output logic [15:0] wdata,
  output logic        write
);
  timeunit 1ns; timeprecision 1ps;

  logic [1:0] rst_s;
  logic [1:0] ds_s;
  logic       ds_q;
  logic       sel_q;

  always_ff @(posedge clk) rst_s <= {rst_s[0], vme.sysreset_n};
  assign rst_n = rst_s[1];

  assign start  = ds_s[1] && !ds_q && (vme.a[23:19] == ga);
  assign active = ds_s[1] && sel_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ds_s   <= '0;
      ds_q   <= 1'b0;
      sel_q  <= 1'b0;
      offset <= '0;
      wdata  <= '0;
      write  <= 1'b0;
    end else begin
      ds_s <= {ds_s[0], !vme.ds0_n};
      ds_q <= ds_s[1];
      if (!ds_s[1]) sel_q <= 1'b0;
      if (start) begin
        sel_q  <= 1'b1;
        offset <= {vme.a[18:1], 1'b0};
        wdata  <= vme.d;
        write  <= !vme.write_n;
      end
    end
  end
endmodule
