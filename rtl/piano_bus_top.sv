// piano_bus_top: key scanning for an 88-key piano on a polled parallel bus.
//
// Four slave boards each watch 22 keys and queue their note-on/note-off
// events. One master selects the boards in turn over the 2-bit SS lines;
// the selected board answers over the shared CTRL/DATA(/VEL) lines, and the
// master acknowledges each part of a message by toggling ACK. Received
// messages are turned into MIDI bytes for the synthesizer.
// Clocks: the master runs on clk_m, the boards on clk_s; the two may be
// unrelated, since every line between master and boards is synchronised at
// its receiver. All boards share clk_s here, which keeps their bus drivers
// from overlapping when the selection moves. rst_n resets both sides.
// Ports: key_down/key_vel are the key sensing outputs, flattened as board
// b key k at index b*KEYS_PER_SLAVE+k; midi_valid/midi_bytes go to the USB
// MIDI link; ss/ack/bus_ctrl and the status outputs make the bus visible.
// The board count, keys per board, bus signals and protocol follow the
// design; the poll interval, queue depth and MIDI numbering are chosen here.
module piano_bus_top
  import piano_pkg::*;
#(
  parameter int unsigned N_SLAVES          = 4,
  parameter int unsigned SS_W              = 2,
  parameter int unsigned KEYS_PER_SLAVE    = 22,
  parameter int unsigned POLL_CYCLES       = 16,
  parameter int unsigned FIFO_DEPTH        = 16,
  parameter bit          DEDICATED_VEL_BUS = 1'b0,
  parameter int unsigned NOTE_BASE         = 21,
  parameter logic [3:0]  MIDI_CHANNEL      = 4'd0
) (
  input  logic                                        clk_m,
  input  logic                                        clk_s,
  input  logic                                        rst_n,
  input  logic [N_SLAVES*KEYS_PER_SLAVE-1:0]          key_down,
  input  logic [N_SLAVES*KEYS_PER_SLAVE-1:0][VEL_W-1:0] key_vel,
  output logic                                        midi_valid,
  output logic [2:0][7:0]                             midi_bytes,
  output logic [SS_W-1:0]                             ss,
  output logic                                        ack,
  output logic [1:0]                                  bus_ctrl,
  output logic                                        bus_contention,
  output logic                                        proto_error,
  output logic                                        midi_range_error,
  output logic [N_SLAVES-1:0][$clog2(FIFO_DEPTH+1)-1:0] fifo_count,
  output logic [N_SLAVES*KEYS_PER_SLAVE-1:0]          keys_pending
);

  logic [N_SLAVES-1:0]             drv;
  logic [N_SLAVES-1:0][1:0]        s_ctrl;
  logic [N_SLAVES-1:0][DATA_W-1:0] s_data;
  logic [N_SLAVES-1:0][VEL_W-1:0]  s_vel;

  ctrl_e             b_ctrl;
  logic [DATA_W-1:0] b_data;
  logic [VEL_W-1:0]  b_vel;

  logic              m_valid, m_on;
  logic [SS_W-1:0]   m_slave;
  logic [NOTE_W-1:0] m_note;
  logic [VEL_W-1:0]  m_vel;

  for (genvar b = 0; b < N_SLAVES; b++) begin : g_slave
    ctrl_e c;
    slave_device #(
      .KEYS(KEYS_PER_SLAVE), .SS_W(SS_W), .SLAVE_ID(SS_W'(b)),
      .FIFO_DEPTH(FIFO_DEPTH), .DEDICATED_VEL_BUS(DEDICATED_VEL_BUS)
    ) u_slave (
      .clk(clk_s), .rst_n,
      .key_down(key_down[b*KEYS_PER_SLAVE +: KEYS_PER_SLAVE]),
      .key_vel (key_vel [b*KEYS_PER_SLAVE +: KEYS_PER_SLAVE]),
      .ss, .ack,
      .drive(drv[b]), .ctrl(c), .data(s_data[b]), .vel(s_vel[b]),
      .fifo_count(fifo_count[b]),
      .keys_pending(keys_pending[b*KEYS_PER_SLAVE +: KEYS_PER_SLAVE])
    );
    assign s_ctrl[b] = c;
  end

  shared_bus #(.N(N_SLAVES)) u_bus (
    .drive(drv), .ctrl_in(s_ctrl), .data_in(s_data), .vel_in(s_vel),
    .ctrl(b_ctrl), .data(b_data), .vel(b_vel), .contention(bus_contention)
  );
  assign bus_ctrl = b_ctrl;

  // the select protocol lets at most one board drive the shared lines
  a_one_driver: assert property (@(posedge clk_s) disable iff (!rst_n) !bus_contention)
    else $error("more than one board drives the shared bus");

  // the master acknowledges only a board that is on the bus
  a_ack_to_driver: assert property (@(posedge clk_m) disable iff (!rst_n) $changed(ack) |-> (drv != '0))
    else $error("ACK toggled while no board drives the bus");

  master_fsm #(
    .N_SLAVES(N_SLAVES), .SS_W(SS_W), .POLL_CYCLES(POLL_CYCLES),
    .DEDICATED_VEL_BUS(DEDICATED_VEL_BUS)
  ) u_master (
    .clk(clk_m), .rst_n,
    .ss, .ack,
    .ctrl(b_ctrl), .data(b_data), .vel(b_vel),
    .msg_valid(m_valid), .msg_on(m_on), .msg_slave(m_slave),
    .msg_note(m_note), .msg_vel(m_vel), .proto_error
  );

  midi_encoder #(
    .SS_W(SS_W), .KEYS_PER_SLAVE(KEYS_PER_SLAVE),
    .NOTE_BASE(NOTE_BASE), .CHANNEL(MIDI_CHANNEL)
  ) u_midi (
    .clk(clk_m), .rst_n,
    .in_valid(m_valid), .in_on(m_on), .in_slave(m_slave),
    .in_note(m_note), .in_vel(m_vel),
    .out_valid(midi_valid), .out_bytes(midi_bytes),
    .range_error(midi_range_error)
  );

endmodule
