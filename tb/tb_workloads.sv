// Workload testbench for synth_fpga at its default parameters: the full
// playing range and the full knob range.
//
// Part 1 plays every note the controller supports, 51 (155.6 Hz) to 108
// (4186 Hz), uncrushed, each for at least three periods, and checks that the
// number of sine periods on the DAC bus equals the number of phase wraps
// (pitch), besides checking every sample. Part 2 holds note 69 and steps the
// divisor through 1..127, 12 samples each, checking every sample against
// trunc(round(127*sin)/d)*d + 128 and that the bus never takes a value that
// is not a multiple of d away from 128.
//
// The controller is the behavioural pic_model, the FPGA clock is 40 MHz.
`timescale 1ns/1ps
module tb_workloads;
  localparam real PI     = 3.14159265358979323846;
  localparam real CLK_NS = 25.0;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        ready, note_on;
  logic [12:0] theta;
  logic [6:0]  crush;
  logic [7:0]  dac_data, dac_code;
  logic        dac_ce_n, dac_cs_n;
  real         vout;

  int checks = 0, failures = 0;

  synth_fpga  dut (.clk, .rst_n, .ready, .note_on, .theta, .crush,
                   .dac_data, .dac_ce_n, .dac_cs_n);
  pic_model   u_pic (.ready, .note_on, .theta, .crush);
  ad558_model u_dac (.db(dac_data), .ce_n(dac_ce_n), .cs_n(dac_cs_n), .vout, .code(dac_code));

  always #(CLK_NS / 2.0) clk = ~clk;

  initial begin
    #1_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_sine(int t);
    real x = 127.0 * $sin(2.0 * PI * real'(t) / 8192.0);
    return (x >= 0.0) ? $rtoi(x + 0.5) : -$rtoi(-x + 0.5);
  endfunction

  function automatic int ref_crush(int s, int d);
    int dd = (d == 0) ? 1 : d;
    return $rtoi(real'(s) / real'(dd)) * dd + 128;
  endfunction

  // per-sample scoreboard
  int  wraps = 0, crossings = 0, n_samples = 0, bad_levels = 0;
  int  prev_code = 0, prev_theta = 0;
  bit  have_sample = 0;

  always @(posedge ready) if (rst_n) begin : capture
    automatic int t = int'(theta);
    automatic int d = int'(crush);
    automatic int exp_code;
    automatic int clocks = 0;
    @(negedge ready);
    while (dac_ce_n && clocks < 6) begin @(posedge clk); clocks++; end
    #1;
    exp_code = note_on ? ref_crush(ref_sine(t), d) : 0;
    checks++;
    if (int'(dac_data) != exp_code || int'(dac_code) != exp_code || clocks > 4) begin
      failures++;
      if (failures < 15) $display("%t theta=%0d d=%0d dac=%0d expected %0d", $time, t, d, dac_data, exp_code);
    end
    if (note_on && ((int'(dac_data) - 128) % ((d == 0) ? 1 : d)) != 0) bad_levels++;
    if (have_sample) begin
      if (t < prev_theta) wraps++;
      if (prev_code < 128 && int'(dac_data) >= 128) crossings++;
    end
    prev_code = int'(dac_data);
    prev_theta = t;
    have_sample = 1;
    n_samples++;
  end

  task automatic wait_samples(int n);
    repeat (n) @(posedge ready);
    #5000;
  endtask

  initial begin
    automatic int notes_ok = 0, divisors = 0;
    repeat (10) @(posedge clk);
    rst_n = 1'b1;
    wait_samples(3);

    // part 1: every note, uncrushed
    for (int n = 51; n <= 108; n++) begin
      automatic int step;
      u_pic.midi_byte(8'h90); u_pic.midi_byte(8'(n)); u_pic.midi_byte(8'd100);
      wait_samples(2);                         // let the new pitch reach the bus
      step = int'(u_pic.dphase);
      wraps = 0; crossings = 0;
      wait_samples(3 * 8192 / step + 2);
      checks++;
      if (wraps < 3 || crossings < wraps - 1 || crossings > wraps + 1) begin
        failures++;
        $display("note %0d (step %0d): %0d periods on the bus, %0d phase wraps", n, step, crossings, wraps);
      end else notes_ok++;
      u_pic.midi_byte(8'h80); u_pic.midi_byte(8'(n)); u_pic.midi_byte(8'd0);
    end

    // part 2: every divisor on note 69
    u_pic.midi_byte(8'h90); u_pic.midi_byte(8'd69); u_pic.midi_byte(8'd100);
    for (int d = 1; d <= 127; d++) begin
      u_pic.midi_byte(8'hB0); u_pic.midi_byte(8'd73); u_pic.midi_byte(8'(d));
      wait_samples(12);
      divisors++;
    end

    checks++;
    if (bad_levels != 0) begin
      failures++;
      $display("%0d samples off the divisor grid", bad_levels);
    end
    checks++; if (notes_ok != 58) failures++;
    checks++; if (divisors != 127) failures++;
    $display("samples=%0d notes_ok=%0d divisors=%0d", n_samples, notes_ok, divisors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
