// Behavioural model of an AD558-style 8-bit voltage-output DAC (pins DB7..DB0,
// CE bar, CS bar, VOUT), for simulation only.
//
// While CE bar or CS bar is high the input latch holds; while both are low it
// is transparent and follows DB. VOUT is the latched code times 10 mV, the
// 0 to 2.56 V range of the part with VOUT strapped to SENSE and SELECT.
// Settling time is not modelled. The latched code is also brought out so a
// testbench can compare it without real arithmetic.
`timescale 1ns/1ps
module ad558_model (
  input  logic [7:0] db,
  input  logic       ce_n,
  input  logic       cs_n,
  output real        vout,
  output logic [7:0] code
);

  initial code = '0;

  always_latch begin
    if (!ce_n && !cs_n) code = db;
  end

  assign vout = real'(code) * 0.010;

endmodule
