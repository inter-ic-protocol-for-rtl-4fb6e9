// slave_fsm: bus side of one slave board.
//
// The board waits until the master's slave-select (SS) lines carry its ID.
// With an empty queue it answers no-data. Otherwise it sends the oldest
// event: a note-off is the note number with CTRL = note-off; a note-on is
// the note number with CTRL = note-on and, once the master has toggled ACK,
// the velocity with CTRL = velocity. After the last part of the message is
// acknowledged (ACK toggled again) the event leaves the queue, the board
// asserts no-data, and it waits for SS to move away before it may be
// selected again, so it sends at most one message per select cycle.
// This sequence follows the design's slave flow chart.
//
// Choices made here: SS and ACK are read through a synchroniser and acted on
// only when settled; ACK is a toggle, compared with its level when the
// message started; if SS moves away before a message is complete the board
// stops driving and keeps the event for the next select cycle. With
// DEDICATED_VEL_BUS set, a note-on goes out in one step, note number on
// DATA and velocity on the separate VEL lines, as proposed for the final
// product. `drive` is high whenever the board is selected and owns the bus.
// Timing: the board reacts 4-5 of its clocks after a change on SS or ACK.
module slave_fsm
  import piano_pkg::*;
#(
  parameter int unsigned SS_W              = 2,
  parameter logic [SS_W-1:0] SLAVE_ID      = '0,
  parameter bit          DEDICATED_VEL_BUS = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the master
  input  logic [SS_W-1:0]   ss,
  input  logic              ack,
  // head of the board's queue
  input  logic              q_empty,
  input  key_event_t        q_head,
  output logic              q_pop,
  // to the shared bus
  output logic              drive,
  output ctrl_e             ctrl,
  output logic [DATA_W-1:0] data,
  output logic [VEL_W-1:0]  vel
);

  typedef enum logic [2:0] {
    S_IDLE,      // not selected
    S_SEND_NOTE, // note number out (note-on or note-off), waiting for ACK
    S_SEND_VEL,  // velocity out, waiting for ACK
    S_DONE       // no-data out, waiting to be deselected
  } state_e;

  state_e          state;
  logic [SS_W:0]   in_q;
  logic            in_stable;
  logic [SS_W-1:0] ss_s;
  logic            ack_s, ack_ref;
  logic            selected, deselected, acked;

  sync_stable #(.W(SS_W + 1)) u_sync (
    .clk, .rst_n, .d({ss, ack}), .q(in_q), .stable(in_stable)
  );
  assign ss_s  = in_q[SS_W:1];
  assign ack_s = in_q[0];

  assign selected   = in_stable && (ss_s == SLAVE_ID);
  assign deselected = in_stable && (ss_s != SLAVE_ID);
  assign acked      = in_stable && (ack_s != ack_ref);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      ack_ref <= 1'b0;
      ctrl    <= CTRL_NO_DATA;
      data    <= '0;
      vel     <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          ack_ref <= ack_s;
          ctrl    <= CTRL_NO_DATA;
          data    <= '0;
          vel     <= '0;
          if (selected) begin
            if (q_empty) begin
              state <= S_DONE;
            end else begin
              state <= S_SEND_NOTE;
              ctrl  <= q_head.on ? CTRL_NOTE_ON : CTRL_NOTE_OFF;
              data  <= DATA_W'(q_head.note);
              if (DEDICATED_VEL_BUS && q_head.on) vel <= q_head.vel;
            end
          end
        end
        S_SEND_NOTE: begin
          if (deselected) begin
            state <= S_IDLE;
          end else if (acked) begin
            ack_ref <= ack_s;
            if (q_head.on && !DEDICATED_VEL_BUS) begin
              state <= S_SEND_VEL;
              ctrl  <= CTRL_VELOCITY;
              data  <= DATA_W'(q_head.vel);
            end else begin
              state <= S_DONE;
              ctrl  <= CTRL_NO_DATA;
              data  <= '0;
              vel   <= '0;
            end
          end
        end
        S_SEND_VEL: begin
          if (deselected) begin
            state <= S_IDLE;
          end else if (acked) begin
            ack_ref <= ack_s;
            state   <= S_DONE;
            ctrl    <= CTRL_NO_DATA;
            data    <= '0;
          end
        end
        S_DONE: begin
          ctrl <= CTRL_NO_DATA;
          data <= '0;
          vel  <= '0;
          if (deselected) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the event leaves the queue once its last part is acknowledged
  assign q_pop = !deselected && acked &&
                 ((state == S_SEND_VEL) ||
                  (state == S_SEND_NOTE && (!q_head.on || DEDICATED_VEL_BUS)));

  assign drive = (state != S_IDLE);

endmodule
