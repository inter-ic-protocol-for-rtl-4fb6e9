// midi_encoder: turns a note message received by the master into the three
// bytes of a MIDI channel message for the synthesizer.
//
// The global key number is the board number times the keys per board plus
// the board's local key number; NOTE_BASE maps key 0 to its MIDI note
// (21 = A0, the lowest piano key, so an 88-key instrument spans 21..108).
// Note-on: 0x90|channel, note, velocity. Note-off: 0x80|channel, note,
// RELEASE_VEL. A global number above 127 cannot be sent and raises
// `range_error` instead of `out_valid`. One register stage: the bytes appear
// on the clock after `in_valid`. That the master sends MIDI is the design's;
// the byte layout is the MIDI standard, and the numbering is a choice made here.
module midi_encoder
  import piano_pkg::*;
#(
  parameter int unsigned SS_W           = 2,
  parameter int unsigned KEYS_PER_SLAVE = 22,
  parameter int unsigned NOTE_BASE      = 21,
  parameter logic [3:0]  CHANNEL        = 4'd0,
  parameter logic [6:0]  RELEASE_VEL    = 7'd64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_on,
  input  logic [SS_W-1:0]   in_slave,
  input  logic [NOTE_W-1:0] in_note,
  input  logic [VEL_W-1:0]  in_vel,
  output logic              out_valid,
  output logic [2:0][7:0]   out_bytes,   // [0] status, [1] note, [2] velocity
  output logic              range_error
);

  logic [15:0] key;

  assign key = 16'(NOTE_BASE) + 16'(in_slave) * 16'(KEYS_PER_SLAVE) + 16'(in_note);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_bytes   <= '0;
      range_error <= 1'b0;
    end else begin
      out_valid   <= in_valid && (key < 16'd128);
      range_error <= in_valid && (key >= 16'd128);
      if (in_valid) begin
        out_bytes[0] <= in_on ? {4'h9, CHANNEL} : {4'h8, CHANNEL};
        out_bytes[1] <= {1'b0, key[6:0]};
        out_bytes[2] <= {1'b0, in_on ? in_vel : RELEASE_VEL};
      end
    end
  end

endmodule
