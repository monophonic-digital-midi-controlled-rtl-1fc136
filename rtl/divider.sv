// Bitcrusher divider: signed sample divided by an unsigned divisor.
//
// quotient = dividend / divisor, rounded toward zero, remainder dropped,
// registered (one clock of latency). The dividend is a two's-complement
// SAMPLE_W-bit sine sample, the divisor the unsigned CRUSH_W-bit crush
// amount, and the quotient has the dividend's width.
//
// Rounding toward zero (the magnitude is rounded down) keeps
// |quotient * divisor| <= |dividend|, so the multiplied-back sample stays in
// the sine's range. A divisor of zero is taken as one (the sample passes
// unchanged); the controller never sends zero, so this only covers start-up.
// The widths and the dropped remainder follow the specification; the
// rounding direction, the zero rule and the latency are this design's.
module divider #(
  parameter int unsigned SAMPLE_W = synth_pkg::SAMPLE_W,
  parameter int unsigned CRUSH_W  = synth_pkg::CRUSH_W
) (
  input  logic                       clk,
  input  logic signed [SAMPLE_W-1:0] dividend,
  input  logic        [CRUSH_W-1:0]  divisor,
  output logic signed [SAMPLE_W-1:0] quotient
);

  localparam int unsigned W = (SAMPLE_W > CRUSH_W ? SAMPLE_W : CRUSH_W) + 1;

  logic signed [W-1:0] num, den, quo;

  always_comb begin
    num = W'(dividend);                                  // sign-extended
    den = (divisor == '0) ? W'(1) : W'({1'b0, divisor}); // positive
    quo = num / den;                                     // truncates toward zero
    // |quo| <= |dividend|, so the quotient always fits the sample width.
    assert (quo[W-1:SAMPLE_W-1] == '0 || quo[W-1:SAMPLE_W-1] == '1)
      else $error("divider: quotient does not fit %0d bits", SAMPLE_W);
  end

  always_ff @(posedge clk) begin
    quotient <= quo[SAMPLE_W-1:0];
  end

endmodule
