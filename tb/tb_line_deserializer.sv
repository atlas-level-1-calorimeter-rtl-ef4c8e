// Testbench for line_deserializer: random samples on all lines; every frame
// must equal the last DES samples in order and frames must come exactly every
// DES clock cycles.
module tb_line_deserializer;
  timeunit 1ns; timeprecision 1ps;

  localparam int W = 25, DES = 8;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] din;
  logic [DES-1:0][W-1:0] frame;
  logic frame_valid;
  int checks = 0, failures = 0;

  line_deserializer #(.W(W), .DES(DES)) dut (.*);

  always #1.5625 clk = ~clk;

  logic [W-1:0] hist [$];
  int last_valid = -1, cyc = 0, frames = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (frame_valid) begin
        // frame holds samples taken at the DES edges up to the previous one
        for (int k = 0; k < DES; k++) begin
          checks++;
          if (frame[k] !== hist[hist.size() - DES + k]) begin
            failures++;
            $display("frame %0d sample %0d: got %h want %h", frames, k, frame[k],
                     hist[hist.size() - DES + k]);
          end
        end
        if (last_valid >= 0) begin
          checks++;
          if (cyc - last_valid != DES) begin
            failures++;
            $display("frame spacing %0d", cyc - last_valid);
          end
        end
        last_valid = cyc;
        frames++;
      end
      hist.push_back(din);
    end
    din <= W'($urandom);
  end

  initial begin
    din = '0;
    repeat (3) @(posedge clk);
    #0.1 rst_n = 1;
    repeat (DES * 50 + 3) @(posedge clk);
    checks++;
    if (frames < 49) begin failures++; $display("only %0d frames", frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
