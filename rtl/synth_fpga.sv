// FPGA half of a monophonic MIDI synthesizer with a bitcrusher effect.
//
// A microcontroller decodes MIDI, keeps the oscillator phase and, 44,100
// times a second, drops ready, writes a 13-bit phase (theta) and a 7-bit
// crush divisor, and raises ready again; note_on tells whether a key is held.
// This module turns each phase into a sine sample, bitcrushes it (divides by
// the divisor, drops the remainder, multiplies back, adds a half-scale
// offset of 128)
// and presents it to an 8-bit DAC, whose CE bar / CS bar strobes follow
// ready: the DAC holds the old sample while ready is high and shows the new
// one once ready falls. With note_on low the bus reads 0.
//
//   input_capture -> sine_gen -> bitcrush (divider, multiplier) -> dac_output
//
// Timing: theta/crush are captured three clocks after ready rises (two for
// synchronisation, one for the register); the sample is ready four clocks
// later and is loaded into the output register then, so ready must stay high
// for at least eight FPGA clocks per sample. The sample computed from the
// phase written at one interrupt reaches the DAC when ready next falls, i.e.
// one sample period later. There is no other constraint on the clock.
//
// The chain of blocks and the ready/note-on control follow the
// specification; widths are its 13/8/7 bits. Sine amplitude, rounding
// direction, synchronisers, latencies and reset are this design's choices,
// described in each block.
module synth_fpga #(
  parameter int unsigned THETA_W   = synth_pkg::THETA_W,
  parameter int unsigned SAMPLE_W  = synth_pkg::SAMPLE_W,
  parameter int unsigned CRUSH_W   = synth_pkg::CRUSH_W,
  parameter int unsigned AMPLITUDE = synth_pkg::SINE_AMPLITUDE,
  parameter int unsigned OFFSET    = synth_pkg::DAC_OFFSET
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ready,
  input  logic                note_on,
  input  logic [THETA_W-1:0]  theta,
  input  logic [CRUSH_W-1:0]  crush,
  output logic [SAMPLE_W-1:0] dac_data,
  output logic                dac_ce_n,
  output logic                dac_cs_n
);

  // input register (1) + sine table (1) + divider (1) + multiplier (1)
  localparam int unsigned PIPE_LATENCY = 4;

  logic                       ready_s, note_on_s;
  logic [THETA_W-1:0]         theta_q;
  logic [CRUSH_W-1:0]         crush_q;
  logic signed [SAMPLE_W-1:0] wave;
  logic [SAMPLE_W-1:0]        crushed;

  input_capture #(.THETA_W(THETA_W), .CRUSH_W(CRUSH_W)) u_in (
    .clk, .rst_n, .ready, .note_on, .theta, .crush,
    .ready_s, .note_on_s, .theta_q, .crush_q
  );

  sine_gen #(.THETA_W(THETA_W), .SAMPLE_W(SAMPLE_W), .AMPLITUDE(AMPLITUDE)) u_sine (
    .clk, .theta(theta_q), .wave
  );

  bitcrush #(.SAMPLE_W(SAMPLE_W), .CRUSH_W(CRUSH_W), .OFFSET(OFFSET)) u_crush (
    .clk, .sample(wave), .divisor(crush_q), .crushed
  );

  dac_output #(.SAMPLE_W(SAMPLE_W), .LATENCY(PIPE_LATENCY)) u_out (
    .clk, .rst_n, .ready_s, .note_on_s, .crushed,
    .dac_data, .dac_ce_n, .dac_cs_n
  );

endmodule
