// Input stage: takes the controller's phase, divisor and flags into the
// FPGA clock domain.
//
// The controller drops ready, rewrites its theta and crush ports, then raises
// ready again, once per audio sample; the ports are therefore only trusted
// while ready is high. ready and note_on pass through two-flop synchronisers
// (the controller has its own clock). theta_q and crush_q load from the ports
// on every clock where the synchronised ready is high and hold while it is
// low, so the datapath never sees a half-written port.
//
// Timing: ready_s and note_on_s follow their inputs two clocks later;
// theta_q/crush_q change on the clock after ready_s is seen high. Reset
// (synchronous, active low) clears everything, which the datapath treats as
// phase 0, divisor 0 (= no crushing), not ready and note off.
//
// Loading the registers on ready follows the specification's block diagram;
// the synchronisers and the reset are this design's additions.
module input_capture #(
  parameter int unsigned THETA_W = synth_pkg::THETA_W,
  parameter int unsigned CRUSH_W = synth_pkg::CRUSH_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ready,
  input  logic               note_on,
  input  logic [THETA_W-1:0] theta,
  input  logic [CRUSH_W-1:0] crush,
  output logic               ready_s,
  output logic               note_on_s,
  output logic [THETA_W-1:0] theta_q,
  output logic [CRUSH_W-1:0] crush_q
);

  logic ready_m, note_on_m;   // first synchroniser stage

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ready_m   <= 1'b0;
      ready_s   <= 1'b0;
      note_on_m <= 1'b0;
      note_on_s <= 1'b0;
      theta_q   <= '0;
      crush_q   <= '0;
    end else begin
      ready_m   <= ready;
      ready_s   <= ready_m;
      note_on_m <= note_on;
      note_on_s <= note_on_m;
      if (ready_s) begin
        theta_q <= theta;
        crush_q <= crush;
      end
    end
  end

endmodule
