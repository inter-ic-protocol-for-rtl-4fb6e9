// slave_device: one slave board of the key bus.
//
// A board watches its group of keys (key_monitor), queues their note-on and
// note-off events (event_fifo) and hands them to the master one per select
// cycle (slave_fsm). Keys, queue and bus side share the board's clock.
// Interface: KEYS key-down inputs with a velocity each, the master's SS and
// ACK lines, and the board's drive/CTRL/DATA/VEL outputs to the shared bus.
// `fifo_count` and `keys_pending` show how much is waiting. The grouping of
// keys per board and the parts of a board follow the design; see the three
// blocks for what is chosen here.
module slave_device
  import piano_pkg::*;
#(
  parameter int unsigned     KEYS              = 22,
  parameter int unsigned     SS_W              = 2,
  parameter logic [SS_W-1:0] SLAVE_ID          = '0,
  parameter int unsigned     FIFO_DEPTH        = 16,
  parameter bit              DEDICATED_VEL_BUS = 1'b0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [KEYS-1:0]            key_down,
  input  logic [KEYS-1:0][VEL_W-1:0] key_vel,
  input  logic [SS_W-1:0]            ss,
  input  logic                       ack,
  output logic                       drive,
  output ctrl_e                      ctrl,
  output logic [DATA_W-1:0]          data,
  output logic [VEL_W-1:0]           vel,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count,
  output logic [KEYS-1:0]            keys_pending
);

  logic       ev_valid, fifo_full, fifo_empty, pop;
  key_event_t ev, head;

  key_monitor #(.KEYS(KEYS)) u_keys (
    .clk, .rst_n,
    .key_down, .key_vel,
    .ev_valid, .ev, .ev_ready(!fifo_full),
    .pending(keys_pending)
  );

  event_fifo #(.WIDTH(EVENT_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en(ev_valid && !fifo_full), .wr_data(ev),
    .rd_en(pop), .rd_data(head),
    .empty(fifo_empty), .full(fifo_full), .count(fifo_count),
    .overflow()
  );

  slave_fsm #(
    .SS_W(SS_W), .SLAVE_ID(SLAVE_ID), .DEDICATED_VEL_BUS(DEDICATED_VEL_BUS)
  ) u_fsm (
    .clk, .rst_n,
    .ss, .ack,
    .q_empty(fifo_empty), .q_head(head), .q_pop(pop),
    .drive, .ctrl, .data, .vel
  );

endmodule
