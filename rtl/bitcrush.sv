// Bitcrusher: reduces the amplitude resolution of a sine sample.
//
// The signed sample is divided by the crush divisor with the remainder
// dropped, then multiplied by the same divisor, so it snaps to a multiple of
// the divisor: the larger the divisor, the coarser the staircase. OFFSET is
// then added to move the two's-complement result into the unsigned range the
// DAC expects (offset binary). With the default full-scale sine (+-127) and
// OFFSET of 128 the output lies in 1..255 for every divisor, and every
// divisor up to 127 still leaves an audible wave (at least -d, 0, +d).
//
// Timing: two clocks from sample/divisor to crushed (divider register, then
// multiplier register; the offset add is combinational after it). The
// divisor is delayed one clock so the multiplier always scales a quotient by
// the divisor that produced it. A divisor of zero acts as one.
//
// The divide-then-multiply structure and the shift into the positive range
// follow the specification; the offset value of 128 (half scale), rounding
// toward zero, the zero rule and the latencies are this design's.
module bitcrush #(
  parameter int unsigned SAMPLE_W = synth_pkg::SAMPLE_W,
  parameter int unsigned CRUSH_W  = synth_pkg::CRUSH_W,
  parameter int unsigned OFFSET   = synth_pkg::DAC_OFFSET
) (
  input  logic                       clk,
  input  logic signed [SAMPLE_W-1:0] sample,
  input  logic        [CRUSH_W-1:0]  divisor,
  output logic        [SAMPLE_W-1:0] crushed
);

  logic        [CRUSH_W-1:0]  eff_div, div_d;
  logic signed [SAMPLE_W-1:0] quot, scaled;

  assign eff_div = (divisor == '0) ? CRUSH_W'(1) : divisor;

  divider #(.SAMPLE_W(SAMPLE_W), .CRUSH_W(CRUSH_W)) u_div (
    .clk, .dividend(sample), .divisor(eff_div), .quotient(quot)
  );

  always_ff @(posedge clk) div_d <= eff_div;

  multiplier #(.SAMPLE_W(SAMPLE_W), .CRUSH_W(CRUSH_W)) u_mul (
    .clk, .a(quot), .b(div_d), .y(scaled)
  );

  assign crushed = SAMPLE_W'(scaled) + SAMPLE_W'(OFFSET);

endmodule
