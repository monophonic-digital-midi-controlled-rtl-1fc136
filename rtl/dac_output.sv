// Output stage: drives the 8-bit DAC bus and its latch strobes.
//
// The DAC (an AD558-style part) latches its input while CE bar or CS bar is
// high and passes it straight through while both are low. Both strobes are
// driven from the synchronised ready, one clock later: while the controller
// holds ready high (inputs valid, new sample being computed) the DAC holds
// the previous sample; when ready falls the DAC turns transparent and shows
// the sample held in the output register.
//
// The output register loads the bitcrusher result only while ready_s is
// high and only after ready_s has been high for LATENCY clocks, the time the
// new phase needs to travel through the input register, sine table, divider
// and multiplier. It then holds through the low phase of ready, so the bus
// is stable whenever the DAC is transparent. The bus is forced to 0 while
// note_on_s is low (silence), selected after the register.
//
// The register enabled by ready, the mux with zero selected by note on and
// CE/CS following ready are the specification's; the settle count, the
// one-clock strobe register and the reset (DAC latched, register 0) are this
// design's.
module dac_output #(
  parameter int unsigned SAMPLE_W = synth_pkg::SAMPLE_W,
  parameter int unsigned LATENCY  = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ready_s,
  input  logic                note_on_s,
  input  logic [SAMPLE_W-1:0] crushed,
  output logic [SAMPLE_W-1:0] dac_data,
  output logic                dac_ce_n,
  output logic                dac_cs_n
);

  localparam int unsigned CNT_W = $clog2(LATENCY + 1);

  logic [CNT_W-1:0]    settle;   // clocks since ready_s rose, saturating
  logic                load;
  logic [SAMPLE_W-1:0] sample_q;
  logic                strobe_n;

  assign load = ready_s && (settle == CNT_W'(LATENCY));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      settle   <= '0;
      sample_q <= '0;
      strobe_n <= 1'b1;
    end else begin
      strobe_n <= ready_s;
      if (!ready_s)                        settle <= '0;
      else if (settle != CNT_W'(LATENCY))  settle <= settle + 1'b1;
      if (load) sample_q <= crushed;
    end
  end

  assign dac_data = note_on_s ? sample_q : '0;
  assign dac_ce_n = strobe_n;
  assign dac_cs_n = strobe_n;

  // The held sample never changes while the DAC is transparent.
  assert property (@(posedge clk) disable iff (!rst_n) !strobe_n |-> !load)
    else $error("dac_output: sample register loaded while DAC transparent");

endmodule
