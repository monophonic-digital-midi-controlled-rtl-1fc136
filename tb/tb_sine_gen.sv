// Self-checking testbench for sine_gen.
//
// Sweeps all 2^13 phases, one per clock, and compares each registered
// output, one clock after its phase, with round(127*sin(2*pi*theta/8192))
// (rounded half away from zero) worked out here with real arithmetic.
// Also checks the four quadrant landmarks (0, +peak, 0, -peak).
`timescale 1ns/1ps
module tb_sine_gen;
  localparam int THETA_W = 13;
  localparam int AMP     = 127;
  localparam real PI     = 3.14159265358979323846;

  logic                clk = 1'b0;
  logic [THETA_W-1:0]  theta = '0;
  logic signed [7:0]   wave;
  int checks = 0, failures = 0;

  sine_gen dut (.clk, .theta, .wave);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_sine(int t);
    real x = real'(AMP) * $sin(2.0 * PI * real'(t) / real'(1 << THETA_W));
    return (x >= 0.0) ? $rtoi(x + 0.5) : -$rtoi(-x + 0.5);
  endfunction

  task automatic check(int t, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("theta=%0d wave=%0d expected %0d", t, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < (1 << THETA_W); t++) begin
      @(negedge clk) theta = THETA_W'(t);
      @(posedge clk) #1;           // one clock of latency
      check(t, int'(wave), ref_sine(t));
      case (t)
        0, 4096: check(t, int'(wave), 0);
        2048:    check(t, int'(wave), AMP);
        6144:    check(t, int'(wave), -AMP);
        default: ;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
