// Sine generator: phase in, two's-complement sine sample out.
//
// theta is the position within one period of the wave, 2^THETA_W steps per
// period. The output is round(AMPLITUDE * sin(2*pi*theta / 2^THETA_W)) as a
// signed SAMPLE_W-bit value, registered, so the sample for a phase appears one
// clock after the phase is presented.
//
// Only a quarter period is stored: a table of 2^(THETA_W-2) magnitudes,
// computed when the design is elaborated. The two top phase bits pick the
// quadrant: bit THETA_W-2 mirrors the table index (second and fourth quarter
// run the table backwards) and bit THETA_W-1 negates the result (second half
// of the period is negative). The one index a mirrored quarter needs beyond
// the table, the peak itself, is AMPLITUDE and is muxed in directly.
//
// The 13-bit phase and the 8-bit sample width are the synthesizer's; the
// quarter-wave table, the one-clock latency and the full-scale amplitude of
// 127 are choices of this implementation.
module sine_gen #(
  parameter int unsigned THETA_W   = synth_pkg::THETA_W,
  parameter int unsigned SAMPLE_W  = synth_pkg::SAMPLE_W,
  parameter int unsigned AMPLITUDE = synth_pkg::SINE_AMPLITUDE
) (
  input  logic                       clk,
  input  logic [THETA_W-1:0]         theta,
  output logic signed [SAMPLE_W-1:0] wave
);

  localparam int unsigned IDX_W = THETA_W - 2;
  localparam int unsigned QUART = 1 << IDX_W;      // table index of the peak
  localparam int unsigned MAG_W = SAMPLE_W - 1;

  if (AMPLITUDE >= (1 << MAG_W)) begin : g_bad_amp
    $error("sine_gen: AMPLITUDE must fit in SAMPLE_W-1 bits");
  end

  typedef logic [MAG_W-1:0] mag_table_t [QUART];

  function automatic mag_table_t make_table();
    mag_table_t t;
    real pi = 3.14159265358979323846;
    for (int unsigned k = 0; k < QUART; k++) begin
      t[k] = MAG_W'($rtoi(real'(AMPLITUDE) * $sin(2.0 * pi * real'(k) / real'(4 * QUART)) + 0.5));
    end
    return t;
  endfunction

  localparam mag_table_t MAG_TABLE = make_table();

  logic              mirror, negate;
  logic [IDX_W-1:0]  idx, addr;
  logic              peak;     // mirrored quarter at index 0: sin = 1
  logic [MAG_W-1:0]  mag;

  always_comb begin
    negate = theta[THETA_W-1];
    mirror = theta[THETA_W-2];
    idx    = theta[IDX_W-1:0];
    peak   = mirror && (idx == '0);
    addr   = mirror ? -idx : idx;  // QUART - idx, modulo QUART
    mag    = peak ? MAG_W'(AMPLITUDE) : MAG_TABLE[addr];
  end

  always_ff @(posedge clk) begin
    wave <= negate ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
  end

endmodule
