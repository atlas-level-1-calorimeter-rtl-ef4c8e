// VME master tasks shared by the testbenches.  The including module provides
// clk40, vme (bpt_pkg::vme_in_t), dtack_n and rd_bus (the data the slave
// drives).  One access: address, data and WRITE* are set up, DS0* is asserted
// half a clock later, the task waits for DTACK* (up to 40 clocks), takes the
// read data and releases DS0*, then waits for DTACK* to go away.
// cycles returns the number of clk40 rising edges from DS0* to DTACK*.

// Bus rules checked on every access once reset is over (bus_armed set by
// the including testbench): DTACK* only falls while DS0* is asserted, and it
// is released within four clocks after DS0* goes away.
bit bus_armed = 0;
a_dtack_in_access: assert property (@(posedge clk40) disable iff (!bus_armed)
  $fell(dtack_n) |-> $past(!vme.ds0_n))
  else begin failures++; $display("%t DTACK* fell without DS0*", $realtime); end
a_dtack_release: assert property (@(posedge clk40) disable iff (!bus_armed)
  vme.ds0_n [*4] |-> dtack_n)
  else begin failures++; $display("DTACK* held after DS0* went away"); end

task automatic vme_access(input logic [23:0] addr, input logic [15:0] wdata, input bit wr,
                          output logic [15:0] rdata, output int cycles, output bit acked);
  @(negedge clk40);
  vme.a       = addr[23:1];
  vme.d       = wr ? wdata : 16'h0000;
  vme.write_n = !wr;
  #5;
  vme.ds0_n   = 1'b0;
  cycles = 0;
  acked  = 0;
  rdata  = '0;
  while (cycles < 40 && !acked) begin
    @(posedge clk40);
    cycles++;
    #1;
    if (!dtack_n) acked = 1;
  end
  rdata = rd_bus;
  @(negedge clk40);
  vme.ds0_n   = 1'b1;
  vme.write_n = 1'b1;
  repeat (5) @(posedge clk40);
endtask

task automatic vme_write(input logic [23:0] addr, input logic [15:0] wdata);
  logic [15:0] r; int c; bit a;
  vme_access(addr, wdata, 1'b1, r, c, a);
  checks++;
  if (!a) begin failures++; $display("write %h: no DTACK", addr); end
endtask

task automatic vme_read(input logic [23:0] addr, output logic [15:0] rdata);
  int c; bit a;
  vme_access(addr, 16'h0, 1'b0, rdata, c, a);
  checks++;
  if (!a) begin failures++; $display("read %h: no DTACK", addr); end
endtask

task automatic vme_expect(input logic [23:0] addr, input logic [15:0] want, input string what);
  logic [15:0] r;
  vme_read(addr, r);
  checks++;
  if (r !== want) begin failures++; $display("%s: read %h from %h, want %h", what, r, addr, want); end
endtask
