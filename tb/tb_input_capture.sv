// Self-checking testbench for input_capture.
//
// Emulates the controller's sample handshake many times with random values:
// ready falls, the phase and divisor ports take a new value (plus garbage
// while ready is low), ready rises. Checks that ready_s and note_on_s follow
// their inputs exactly two clocks later, that theta_q/crush_q hold while
// ready_s is low, and that they equal the ports one clock after ready_s has
// been seen high.
`timescale 1ns/1ps
module tb_input_capture;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        ready = 1'b0, note_on = 1'b0;
  logic [12:0] theta = '0;
  logic [6:0]  crush = '0;
  logic        ready_s, note_on_s;
  logic [12:0] theta_q;
  logic [6:0]  crush_q;
  int checks = 0, failures = 0;
  logic [1:0] ready_hist = '0, note_hist = '0;   // inputs at the last two edges

  input_capture dut (.clk, .rst_n, .ready, .note_on, .theta, .crush,
                     .ready_s, .note_on_s, .theta_q, .crush_q);

  always #5 clk = ~clk;

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

  // synchroniser delay and hold behaviour, checked at every edge
  logic prev_ready_s = 1'b0;
  logic [12:0] prev_theta_q = '0;
  logic [6:0]  prev_crush_q = '0;
  always @(posedge clk) if (rst_n) begin
    #1;
    expect_eq("ready_s", int'(ready_s), int'(ready_hist[1]));
    expect_eq("note_on_s", int'(note_on_s), int'(note_hist[1]));
    if (!prev_ready_s) begin
      expect_eq("theta_q hold", int'(theta_q), int'(prev_theta_q));
      expect_eq("crush_q hold", int'(crush_q), int'(prev_crush_q));
    end
    prev_ready_s = ready_s;
    prev_theta_q = theta_q;
    prev_crush_q = crush_q;
  end
  always @(posedge clk) begin
    ready_hist <= {ready_hist[0], ready};
    note_hist  <= {note_hist[0], note_on};
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int s = 0; s < 2000; s++) begin
      automatic logic [12:0] t = 13'($urandom);
      automatic logic [6:0]  c = 7'($urandom);
      automatic int low = 2 + int'($urandom_range(6));
      automatic int high = 4 + int'($urandom_range(20));
      @(negedge clk) ready = 1'b0;
      repeat (low) @(negedge clk) begin theta = 13'($urandom); crush = 7'($urandom); end
      @(negedge clk) begin theta = t; crush = c; end
      @(negedge clk) begin ready = 1'b1; note_on = 1'($urandom); end
      repeat (high) @(negedge clk);
      expect_eq("theta_q", int'(theta_q), int'(t));
      expect_eq("crush_q", int'(crush_q), int'(c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
