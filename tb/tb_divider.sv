// Self-checking testbench for divider.
//
// Tries every signed 8-bit dividend against every 7-bit divisor (0 included,
// which must act as 1). The expected quotient is the real quotient truncated
// toward zero. Checks the one-clock latency by changing the inputs on the
// falling edge and reading the result after the next rising edge.
`timescale 1ns/1ps
module tb_divider;
  logic              clk = 1'b0;
  logic signed [7:0] dividend = '0;
  logic        [6:0] divisor = 7'd1;
  logic signed [7:0] quotient;
  int checks = 0, failures = 0;

  divider dut (.clk, .dividend, .divisor, .quotient);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 128; d++) begin
      for (int a = -128; a < 128; a++) begin
        automatic int exp;
        automatic real dr = (d == 0) ? 1.0 : real'(d);
        exp = $rtoi(real'(a) / dr);      // $rtoi truncates toward zero
        @(negedge clk) begin dividend = 8'(a); divisor = 7'(d); end
        @(posedge clk) #1;
        checks++;
        if (int'(quotient) != exp) begin
          failures++;
          if (failures < 10) $display("%0d / %0d = %0d, expected %0d", a, d, quotient, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
