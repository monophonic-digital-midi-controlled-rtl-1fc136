// Self-checking testbench for multiplier.
//
// Tries every signed 8-bit a against every 7-bit b and compares y, one clock
// later, with the low 8 bits of the integer product. For pairs where the true
// product fits 8 bits signed (all that occur after the divider) it also
// checks that y equals the true product.
`timescale 1ns/1ps
module tb_multiplier;
  logic              clk = 1'b0;
  logic signed [7:0] a = '0;
  logic        [6:0] b = '0;
  logic signed [7:0] y;
  int checks = 0, failures = 0;

  multiplier dut (.clk, .a, .b, .y);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int bi = 0; bi < 128; bi++) begin
      for (int ai = -128; ai < 128; ai++) begin
        automatic int p = ai * bi;
        automatic int low = ((p % 256) + 256) % 256;
        @(negedge clk) begin a = 8'(ai); b = 7'(bi); end
        @(posedge clk) #1;
        checks++;
        if (int'($unsigned(y)) != low) begin
          failures++;
          if (failures < 10) $display("%0d * %0d -> %0d, expected low byte %0d", ai, bi, y, low);
        end
        if (p >= -128 && p <= 127) begin
          checks++;
          if (int'(y) != p) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
