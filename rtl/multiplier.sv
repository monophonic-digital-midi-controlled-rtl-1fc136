// Bitcrusher multiplier: scales the quotient back up by the divisor.
//
// y = a * b, with a the signed SAMPLE_W-bit quotient and b the unsigned
// CRUSH_W-bit divisor, registered (one clock of latency). Only the low
// SAMPLE_W bits of the product are kept, as the specification's 8-bit Y port
// does; because the quotient came from a division by the same divisor
// rounded toward zero, |a * b| never exceeds the original sample and no bits
// are lost. The latency is this design's choice.
module multiplier #(
  parameter int unsigned SAMPLE_W = synth_pkg::SAMPLE_W,
  parameter int unsigned CRUSH_W  = synth_pkg::CRUSH_W
) (
  input  logic                       clk,
  input  logic signed [SAMPLE_W-1:0] a,
  input  logic        [CRUSH_W-1:0]  b,
  output logic signed [SAMPLE_W-1:0] y
);

  // The low SAMPLE_W bits of a product do not depend on how the operands
  // are extended, so the multiply is done at SAMPLE_W bits with b
  // zero-extended (it is unsigned) and a taken as its bit pattern.
  logic [SAMPLE_W-1:0] product;

  always_comb begin
    product = SAMPLE_W'(a) * SAMPLE_W'(b);
  end

  always_ff @(posedge clk) begin
    y <= $signed(product);
  end

endmodule
