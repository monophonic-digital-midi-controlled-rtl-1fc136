// Self-checking testbench for dac_output.
//
// The bitcrusher input is a free-running count, so the value the output
// register captured tells exactly on which clock it loaded. For many random
// ready-high/ready-low lengths it checks: CE bar and CS bar equal ready_s one
// clock later; the bus value while the DAC is transparent is the input seen
// at the last clock ready_s was high, if ready_s was high for more than
// LATENCY (4) clocks, and otherwise the previous sample; the bus stays
// constant while transparent; and it reads 0 whenever note_on_s is low.
`timescale 1ns/1ps
module tb_dac_output;
  localparam int LATENCY = 4;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       ready_s = 1'b0, note_on_s = 1'b1;
  logic [7:0] crushed = '0;
  logic [7:0] dac_data;
  logic       dac_ce_n, dac_cs_n;
  int checks = 0, failures = 0;
  int held = 0;       // sample the register should hold
  int short_pulses = 0, muted = 0;

  dac_output dut (.clk, .rst_n, .ready_s, .note_on_s, .crushed,
                  .dac_data, .dac_ce_n, .dac_cs_n);

  always #5 clk = ~clk;
  always @(posedge clk) crushed <= crushed + 8'd1;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%t %s=%0d expected %0d", $time, what, got, exp);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    automatic logic ready_at_edge = ready_s;
    #1;
    expect_eq("ce_n", int'(dac_ce_n), int'(ready_at_edge));
    expect_eq("cs_n", int'(dac_cs_n), int'(ready_at_edge));
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    expect_eq("reset data", int'(dac_data), 0);
    for (int s = 0; s < 3000; s++) begin
      automatic int high = 1 + int'($urandom_range(12));
      automatic int low  = 2 + int'($urandom_range(8));
      automatic int last_in = 0;
      @(negedge clk) ready_s = 1'b1;
      for (int k = 0; k < high; k++) begin
        @(posedge clk) last_in = int'(crushed);   // value seen at this edge
        @(negedge clk);
      end
      if (high > LATENCY) held = last_in; else short_pulses++;
      ready_s = 1'b0;
      @(posedge clk); @(posedge clk) #1;          // strobe low: transparent
      expect_eq("transparent", int'(dac_ce_n), 0);
      expect_eq("sample", int'(dac_data), note_on_s ? held : 0);
      for (int k = 0; k < low; k++) begin
        @(negedge clk);
        if (k == low / 2) begin
          note_on_s = 1'b0;
          #1 expect_eq("mute", int'(dac_data), 0);
          muted++;
          note_on_s = (s % 5 != 0);
        end else begin
          expect_eq("stable", int'(dac_data), note_on_s ? held : 0);
        end
      end
    end
    checks++;
    if (short_pulses == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
