// End-to-end testbench for synth_fpga at its default parameters.
//
// A behavioural controller (pic_model) decodes a scripted MIDI byte stream
// and produces the 44.1 kHz theta/crush/ready/note_on handshake; an AD558
// model sits on the DAC bus. The FPGA clock is 40 MHz.
//
// For every sample the scoreboard takes theta and crush while ready is high,
// and checks, when ready next falls, that the DAC turns transparent within
// four clocks and shows round(127*sin(2*pi*theta/8192)) divided by the
// divisor (truncated toward zero), multiplied back and offset by 128, or 0
// if no note is held; that the DAC latch held the previous sample while
// ready was high; and that VOUT is the code times 10 mV. It also checks the
// sample spacing (one sample per 22.68 us) and the pitch of note 69 (sine
// periods seen on the bus against phase wraps).
//
// The script makes every mechanism happen and counts it: silence while no
// note is held, notes played, samples audibly crushed, divisor changes,
// ignored controls (other knob, value 0), running status, an Active Sensing
// byte inside a message, falling back to a still-held note, and the output
// register reloading while the DAC is latched. A mechanism that never
// happened is a failure.
`timescale 1ns/1ps
module tb_synth_fpga;
  localparam real PI      = 3.14159265358979323846;
  localparam real CLK_NS  = 25.0;
  localparam real SAMPLE  = 1.0e9 / 44100.0;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        ready, note_on;
  logic [12:0] theta;
  logic [6:0]  crush;
  logic [7:0]  dac_data, dac_code;
  logic        dac_ce_n, dac_cs_n;
  real         vout;

  int checks = 0, failures = 0;

  synth_fpga dut (.clk, .rst_n, .ready, .note_on, .theta, .crush,
                  .dac_data, .dac_ce_n, .dac_cs_n);
  pic_model  u_pic (.ready, .note_on, .theta, .crush);
  ad558_model u_dac (.db(dac_data), .ce_n(dac_ce_n), .cs_n(dac_cs_n), .vout, .code(dac_code));

  always #(CLK_NS / 2.0) clk = ~clk;

  initial begin
    #60_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("%t %s=%0d expected %0d", $time, what, got, exp);
    end
  endtask

  function automatic int ref_sine(int t);
    real x = 127.0 * $sin(2.0 * PI * real'(t) / 8192.0);
    return (x >= 0.0) ? $rtoi(x + 0.5) : -$rtoi(-x + 0.5);
  endfunction

  function automatic int ref_crush(int s, int d);
    int dd = (d == 0) ? 1 : d;
    return $rtoi(real'(s) / real'(dd)) * dd + 128;
  endfunction

  // ---------------- scoreboard ----------------
  int  n_silent = 0, n_played = 0, n_crushed = 0, n_div_changes = 0, n_latch_reload = 0;
  int  n_samples = 0, wraps = 0, crossings = 0;
  bit  counting_pitch = 0;
  int  prev_code = 0, prev_theta = 0, prev_div = 1;
  bit  have_sample = 0;
  realtime last_transparent = 0;

  always @(posedge ready) if (rst_n) begin : capture
    automatic int t = int'(theta);
    automatic int d = int'(crush);
    automatic int exp_on, exp_code;
    automatic int hold_code = int'(dac_code);
    automatic int clocks = 0;
    automatic bit reloaded = 0;
    // while ready is high: the DAC must keep the old sample
    while (ready) begin
      @(posedge clk or negedge ready);
      if (ready && dac_ce_n) begin
        if (int'(dac_code) != hold_code) begin
          failures++;
          if (failures < 15) $display("%t DAC latch did not hold", $time);
        end
        if (int'(dac_data) != hold_code) reloaded = 1;
      end
    end
    checks++;
    if (reloaded && hold_code != 0) n_latch_reload++;
    // ready fell: the DAC must turn transparent within four clocks
    while (dac_ce_n && clocks < 6) begin @(posedge clk); clocks++; end
    #1;
    checks++;
    if (clocks > 4 || dac_ce_n || dac_cs_n) begin
      failures++;
      $display("%t DAC not transparent %0d clocks after ready fell", $time, clocks);
    end
    exp_on   = int'(note_on);
    exp_code = (exp_on != 0) ? ref_crush(ref_sine(t), d) : 0;
    expect_eq("dac_data", int'(dac_data), exp_code);
    expect_eq("dac code", int'(dac_code), exp_code);
    checks++;
    if (vout < real'(exp_code) * 0.01 - 1e-6 || vout > real'(exp_code) * 0.01 + 1e-6) failures++;
    if (have_sample) begin
      automatic realtime dt = $realtime - last_transparent;
      checks++;
      if (dt < SAMPLE - CLK_NS || dt > SAMPLE + CLK_NS) begin
        failures++;
        $display("%t sample spacing %0.1f ns", $time, dt);
      end
    end
    last_transparent = $realtime;
    if (exp_on == 0) n_silent++;
    else begin
      n_played++;
      if (exp_code != ref_sine(t) + 128) n_crushed++;
    end
    if (have_sample && d != prev_div) n_div_changes++;
    if (counting_pitch && have_sample) begin
      if (t < prev_theta) wraps++;
      if (prev_code < 128 && int'(dac_data) >= 128) crossings++;
    end
    prev_code = int'(dac_data);
    prev_theta = t;
    prev_div = d;
    have_sample = 1;
    n_samples++;
  end

  // ---------------- MIDI script ----------------
  task automatic wait_samples(int n);
    repeat (n) @(posedge ready);
    #5000;                                     // mid-sample
  endtask

  task automatic send(logic [7:0] bytes[$]);
    foreach (bytes[i]) u_pic.midi_byte(bytes[i]);
  endtask

  int ignored_controls = 0;

  initial begin
    repeat (10) @(posedge clk);
    rst_n = 1'b1;

    wait_samples(20);                          // no note yet: silence
    send('{8'h90, 8'd69, 8'd100});             // A4 on
    wait_samples(2);
    counting_pitch = 1;
    wait_samples(400);                         // ~4 periods of 441 Hz
    counting_pitch = 0;
    checks++;
    if (wraps < 3 || crossings < wraps - 1 || crossings > wraps + 1) begin
      failures++;
      $display("pitch: %0d sine periods on the bus, %0d phase wraps", crossings, wraps);
    end

    send('{8'hB0, 8'd73, 8'd16});              // crush knob -> 16
    wait_samples(100);
    expect_eq("crush after knob", int'(crush), 16);
    send('{8'hB0, 8'd73, 8'd0});               // value 0 is ignored
    send('{8'hB0, 8'd10, 8'd50});              // another knob is ignored
    wait_samples(2);
    expect_eq("crush after ignored controls", int'(crush), 16);
    if (int'(crush) == 16) ignored_controls += 2;
    send('{8'hB0, 8'd73, 8'd3});               // not a power of two
    wait_samples(100);
    send('{8'hB0, 8'd73, 8'd127});             // maximum crush
    wait_samples(100);

    // running status and a heartbeat byte inside a message
    send('{8'h90, 8'd72, 8'hFE, 8'd100});      // C5 on, Active Sensing inside
    wait_samples(50);
    expect_eq("note after sensing", u_pic.curr_note, 72);
    send('{8'd76, 8'd100});                    // E5 on, running status
    wait_samples(50);
    expect_eq("note after running status", u_pic.curr_note, 76);
    send('{8'd76, 8'd0});                      // E5 off (velocity 0): back to C5
    wait_samples(50);
    expect_eq("fallback note", u_pic.curr_note, 72);
    expect_eq("note_on during fallback", int'(note_on), 1);
    send('{8'h80, 8'd72, 8'd64});              // C5 off: silence
    wait_samples(30);
    expect_eq("note_on after release", int'(note_on), 0);

    $display("samples=%0d silent=%0d played=%0d crushed=%0d divisor_changes=%0d latch_reloads=%0d",
             n_samples, n_silent, n_played, n_crushed, n_div_changes, n_latch_reload);
    $display("running_status=%0d sensing_dropped=%0d fallbacks=%0d ignored_controls=%0d pitch_periods=%0d",
             u_pic.running_status, u_pic.dropped_sensing, u_pic.fallbacks, ignored_controls, crossings);
    expect_eq("samples = interrupts", n_samples, u_pic.samples - 1);
    checks++; if (n_silent == 0) failures++;
    checks++; if (n_played == 0) failures++;
    checks++; if (n_crushed == 0) failures++;
    checks++; if (n_div_changes < 3) failures++;
    checks++; if (n_latch_reload == 0) failures++;
    checks++; if (u_pic.running_status == 0) failures++;
    checks++; if (u_pic.dropped_sensing == 0) failures++;
    checks++; if (u_pic.fallbacks == 0) failures++;
    checks++; if (ignored_controls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
