// Self-checking testbench for bitcrush.
//
// Feeds a new random sample in -127..127 and a random divisor (0..127) every
// clock and checks that, exactly two clocks later, crushed equals
// trunc(sample/divisor)*divisor + 128 (divisor 0 acting as 1), computed here
// with real arithmetic. Then sweeps one sine period at divisor 16 and checks
// that the output takes only multiples of 16 (plus 128) and that the number
// of distinct levels is what that divisor allows.
`timescale 1ns/1ps
module tb_bitcrush;
  localparam int LAT = 2;
  localparam real PI = 3.14159265358979323846;

  logic              clk = 1'b0;
  logic signed [7:0] sample = '0;
  logic        [6:0] divisor = 7'd1;
  logic        [7:0] crushed;
  int checks = 0, failures = 0;
  int exp_q[$];

  bitcrush dut (.clk, .sample, .divisor, .crushed);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(int s, int d);
    real dr = (d == 0) ? 1.0 : real'(d);
    int q = $rtoi(real'(s) / dr);
    return (q * $rtoi(dr) + 128) & 255;
  endfunction

  initial begin
    bit seen[int];
    // random stream, latency check
    for (int i = 0; i < LAT - 1; i++) exp_q.push_back(-1);  // result after the 2nd edge
    for (int i = 0; i < 20000; i++) begin
      automatic int s = int'($urandom_range(254)) - 127;
      automatic int d = int'($urandom_range(127));
      if (i % 7 == 0) d = 0;
      @(negedge clk) begin sample = 8'(s); divisor = 7'(d); end
      exp_q.push_back(expected(s, d));
      @(posedge clk) #1;
      begin
        automatic int e = exp_q.pop_front();
        if (e >= 0) begin
          checks++;
          if (int'(crushed) != e) begin
            failures++;
            if (failures < 10) $display("step %0d: crushed=%0d expected %0d", i, crushed, e);
          end
        end
      end
    end
    // one sine period at divisor 16: a staircase of multiples of 16
    for (int t = 0; t < 256 + LAT; t++) begin
      automatic int s = (t < 256) ? $rtoi(127.0 * $sin(2.0 * PI * real'(t) / 256.0)) : 0;
      @(negedge clk) begin sample = 8'(s); divisor = 7'd16; end
      @(posedge clk) #1;
      if (t >= LAT) begin
        checks++;
        if ((int'(crushed) - 128) % 16 != 0) failures++;
        seen[int'(crushed)] = 1'b1;
      end
    end
    // trunc(x/16)*16 for x in -126..126 gives -112, -96, ..., 96, 112
    checks++;
    if (seen.num() != 15) begin
      failures++;
      $display("staircase has %0d levels, expected 15", seen.num());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
