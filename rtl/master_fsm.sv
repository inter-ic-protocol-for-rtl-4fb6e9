// master_fsm: the bus master that polls the slave boards in turn.
//
// The master drives the slave-select (SS) lines with one board's ID, waits
// POLL_CYCLES clocks for the board to answer, and then reads CTRL:
//   no-data  -> select the next board (round robin);
//   note-off -> take the note number, toggle ACK, report the message, then
//               wait for no-data before moving on;
//   note-on  -> take the note number and toggle ACK, wait for CTRL =
//               velocity, take the velocity, toggle ACK, report the
//               message, then wait for no-data before moving on.
// This is the design's master flow chart and state diagram. The wait
// length, the encoding and everything below are choices made here.
//
// The slaves run on their own clocks, so CTRL, DATA and VEL pass through a
// synchroniser and are acted on only when the whole bundle has held one
// value for two clocks. With DEDICATED_VEL_BUS set, a note-on carries its
// velocity on the VEL lines and is complete after one ACK.
// A CTRL = velocity seen where a note number is expected breaks the protocol:
// the master then counts a `proto_error` pulse and waits for no-data.
// Timing: SS changes on the clock after the master sees no-data; `msg_valid`
// pulses for one clock with the message when its last ACK toggles.
module master_fsm
  import piano_pkg::*;
#(
  parameter int unsigned N_SLAVES          = 4,
  parameter int unsigned SS_W              = 2,
  parameter int unsigned POLL_CYCLES       = 16,
  parameter bit          DEDICATED_VEL_BUS = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  // to the slaves
  output logic [SS_W-1:0]   ss,
  output logic              ack,
  // from the shared bus
  input  ctrl_e             ctrl,
  input  logic [DATA_W-1:0] data,
  input  logic [VEL_W-1:0]  vel,
  // received messages
  output logic              msg_valid,
  output logic              msg_on,
  output logic [SS_W-1:0]   msg_slave,
  output logic [NOTE_W-1:0] msg_note,
  output logic [VEL_W-1:0]  msg_vel,
  output logic              proto_error
);

  typedef enum logic [2:0] {
    M_WAIT,       // SS asserted, waiting the poll interval
    M_CHECK,      // reading CTRL once it has settled
    M_WAIT_VEL,   // note-on received, waiting for the velocity
    M_WAIT_NODATA // message done, waiting for the slave to release CTRL
  } state_e;

  localparam int unsigned CW = $clog2(POLL_CYCLES + 1);

  state_e             state;
  logic [CW-1:0]      timer;
  logic [1:0]         ctrl_raw;
  logic [1:0]         ctrl_q;
  ctrl_e              ctrl_s;
  logic [DATA_W-1:0]  data_s;
  logic [VEL_W-1:0]   vel_s;
  logic               bus_stable;

  assign ctrl_raw = ctrl;

  sync_stable #(
    .W      (2 + DATA_W + VEL_W),
    .RST_VAL({CTRL_NO_DATA, {(DATA_W + VEL_W){1'b0}}})
  ) u_sync (
    .clk, .rst_n,
    .d     ({ctrl_raw, data, vel}),
    .q     ({ctrl_q, data_s, vel_s}),
    .stable(bus_stable)
  );
  assign ctrl_s = ctrl_e'(ctrl_q);

  function automatic logic [SS_W-1:0] next_slave(input logic [SS_W-1:0] s);
    return (s == SS_W'(N_SLAVES - 1)) ? '0 : s + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= M_WAIT;
      timer       <= '0;
      ss          <= '0;
      ack         <= 1'b0;
      msg_valid   <= 1'b0;
      msg_on      <= 1'b0;
      msg_slave   <= '0;
      msg_note    <= '0;
      msg_vel     <= '0;
      proto_error <= 1'b0;
    end else begin
      msg_valid   <= 1'b0;
      proto_error <= 1'b0;
      unique case (state)
        M_WAIT: begin
          if (timer == CW'(POLL_CYCLES - 1)) begin
            state <= M_CHECK;
            timer <= '0;
          end else begin
            timer <= timer + 1'b1;
          end
        end
        M_CHECK: begin
          if (bus_stable) begin
            unique case (ctrl_s)
              CTRL_NO_DATA: begin
                ss    <= next_slave(ss);
                state <= M_WAIT;
              end
              CTRL_NOTE_OFF: begin
                ack       <= ~ack;
                msg_valid <= 1'b1;
                msg_on    <= 1'b0;
                msg_slave <= ss;
                msg_note  <= NOTE_W'(data_s);
                msg_vel   <= '0;
                state     <= M_WAIT_NODATA;
              end
              CTRL_NOTE_ON: begin
                ack       <= ~ack;
                msg_on    <= 1'b1;
                msg_slave <= ss;
                msg_note  <= NOTE_W'(data_s);
                if (DEDICATED_VEL_BUS) begin
                  msg_vel   <= vel_s;
                  msg_valid <= 1'b1;
                  state     <= M_WAIT_NODATA;
                end else begin
                  state     <= M_WAIT_VEL;
                end
              end
              default: begin
                proto_error <= 1'b1;
                state       <= M_WAIT_NODATA;
              end
            endcase
          end
        end
        M_WAIT_VEL: begin
          if (bus_stable && ctrl_s == CTRL_VELOCITY) begin
            ack       <= ~ack;
            msg_vel   <= VEL_W'(data_s);
            msg_valid <= 1'b1;
            state     <= M_WAIT_NODATA;
          end
        end
        M_WAIT_NODATA: begin
          if (bus_stable && ctrl_s == CTRL_NO_DATA) begin
            ss    <= next_slave(ss);
            state <= M_WAIT;
          end
        end
        default: state <= M_WAIT;
      endcase
    end
  end

endmodule
