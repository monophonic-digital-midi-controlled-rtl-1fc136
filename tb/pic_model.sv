// Behavioural model of the synthesizer's microcontroller, as seen from the
// FPGA's pins. Not synthesizable; for simulation only.
//
// MIDI side: the testbench hands it received bytes with midi_byte(). Like the
// firmware it assembles three-byte messages, keeps the last status byte for
// running status (a message that starts with a data byte reuses it), drops
// Active Sensing bytes (0xFE) wherever they appear, and decodes:
//   note on, velocity > 0  -> remember the previous note, play the new one
//   note off / velocity 0  -> if a previous note is still remembered, fall
//                             back to it (or forget it if it is the one
//                             released); otherwise stop the note
//   control 73, value > 0  -> new crush divisor
// The phase step of a note is round(2^13 * f / 44100) with
// f = 440 * 2^((note-69)/12), for notes 51..108, and 0 for the others.
//
// Sample side: every SAMPLE_NS (1/44.1 kHz) it drops ready, writes the
// current 13-bit phase to theta and the divisor to crush, advances the phase
// by the step and, READY_LOW_NS later, raises ready again. Before any note
// the step is 154 and the divisor 1; note_on starts low.
`timescale 1ns/1ps
module pic_model #(
  parameter real SAMPLE_NS    = 1.0e9 / 44100.0,
  parameter real READY_LOW_NS = 1000.0
) (
  output logic        ready,
  output logic        note_on,
  output logic [12:0] theta,
  output logic [6:0]  crush
);

  localparam int CRUSH_CONTROL = 73;
  localparam logic [3:0] NOTE_ON_OP = 4'h9, NOTE_OFF_OP = 4'h8, CONTROL_OP = 4'hB;

  logic [12:0] phase = '0;
  logic [12:0] dphase = 13'd154;
  logic [6:0]  crush_val = 7'd1;
  logic [3:0]  status_op = '0;
  logic [7:0]  data1 = '0;
  int          rcv_state = 0;
  int          curr_note = 0, last_note = 0;
  int          samples = 0;          // interrupts taken
  int          messages = 0;         // complete messages decoded
  int          running_status = 0;   // messages that reused a status byte
  int          dropped_sensing = 0;  // 0xFE bytes dropped
  int          fallbacks = 0;        // note offs that resumed a held note

  initial begin
    ready   = 1'b0;
    note_on = 1'b0;
    theta   = '0;
    crush   = 7'd1;
  end

  function automatic logic [12:0] phase_step(int note);
    real f;
    if (note < 51 || note > 108) return '0;
    f = 440.0 * (2.0 ** (real'(note - 69) / 12.0));
    return 13'($rtoi(8192.0 * f / 44100.0 + 0.5));
  endfunction

  task automatic decode(logic [7:0] d2);
    messages++;
    case (status_op)
      NOTE_ON_OP, NOTE_OFF_OP: begin
        if (status_op == NOTE_ON_OP && d2 != 0) begin
          last_note = curr_note;
          curr_note = int'(data1);
          dphase    = phase_step(curr_note);
          note_on   = 1'b1;
        end else if (last_note != 0) begin
          if (last_note != int'(data1)) begin
            curr_note = last_note;
            dphase    = phase_step(curr_note);
            fallbacks++;
          end
          last_note = 0;
        end else begin
          curr_note = 0;
          note_on   = 1'b0;
        end
      end
      CONTROL_OP:
        if (int'(data1) == CRUSH_CONTROL && d2 != 0) crush_val = d2[6:0];
      default: ;
    endcase
  endtask

  task automatic midi_byte(logic [7:0] b);
    if (b == 8'hFE) begin
      dropped_sensing++;
      return;
    end
    case (rcv_state)
      0: if (b[7]) begin
           status_op = b[7:4];
           rcv_state = 1;
         end else begin
           data1 = b;                // running status
           running_status++;
           rcv_state = 2;
         end
      1: begin data1 = b; rcv_state = 2; end
      default: begin decode(b); rcv_state = 0; end
    endcase
  endtask

  // timer interrupt
  initial begin
    forever begin
      #(SAMPLE_NS - READY_LOW_NS);
      ready = 1'b0;
      #(READY_LOW_NS / 2.0);
      theta = phase;
      crush = crush_val;
      phase = phase + dphase;
      #(READY_LOW_NS / 2.0);
      ready = 1'b1;
      samples++;
    end
  end

endmodule
