// Shared widths and sample types of the bitcrusher synthesizer datapath.
//
// The phase word is 13 bits (2^13 steps per sine period), samples are 8 bits
// so they fit the 8-bit DAC, and the crush divisor is 7 bits (the controller's
// 7-bit port). These three numbers come from the synthesizer's specification.
// The sine uses the full signed range and the offset to the DAC's unsigned
// code is half scale; those two follow from the sample width.
package synth_pkg;

  localparam int unsigned THETA_W  = 13;  // phase word width
  localparam int unsigned SAMPLE_W = 8;   // sine / DAC sample width
  localparam int unsigned CRUSH_W  = 7;   // bitcrusher divisor width

  // Sine peak and the offset that turns the signed result into an unsigned
  // DAC code (adding 2^(SAMPLE_W-1) is the same as inverting the sign bit).
  localparam int unsigned SINE_AMPLITUDE = (1 << (SAMPLE_W - 1)) - 1;  // 127
  localparam int unsigned DAC_OFFSET     = 1 << (SAMPLE_W - 1);        // 128

  typedef logic        [THETA_W-1:0]  theta_t;
  typedef logic signed [SAMPLE_W-1:0] sample_t;   // two's-complement sine sample
  typedef logic        [SAMPLE_W-1:0] dac_code_t; // offset-binary DAC code
  typedef logic        [CRUSH_W-1:0]  crush_t;

endpackage
