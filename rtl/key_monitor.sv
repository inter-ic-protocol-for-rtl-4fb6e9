// key_monitor: watches the keys of one slave board and turns their changes
// into note-on and note-off events for the board's queue.
//
// Each key has one key-down input and a velocity input from the optical
// sensing stage (velocity is read at the clock where the key goes down).
// A press sets the key's pending-on bit and stores its velocity; a release
// sets its pending-off bit. Every clock the lowest-numbered key with a
// pending event is offered on `ev_*`. A key can hold one pending note-on
// and one pending note-off; `off_first` remembers which of the two came
// first, so they leave in the order they happened. The event leaves when `ev_ready` is high
// (the queue is not full); otherwise it stays pending, so a full queue
// delays events but loses none. A key pressed again before its first press
// was sent keeps one pending note-on, with the newest velocity.
// One key count per board (22) and 7-bit velocities follow the design;
// the edge detection and priority order are choices made here.
module key_monitor
  import piano_pkg::*;
#(
  parameter int unsigned KEYS = 22
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [KEYS-1:0]        key_down,
  input  logic [KEYS-1:0][VEL_W-1:0] key_vel,
  output logic                   ev_valid,
  output key_event_t             ev,
  input  logic                   ev_ready,
  output logic [KEYS-1:0]        pending    // keys with an event not yet queued
);

  logic [KEYS-1:0]            prev_down;
  logic [KEYS-1:0]            pend_on, pend_off;
  logic [KEYS-1:0]            off_first;  // pending note-off older than pending note-on
  logic [KEYS-1:0][VEL_W-1:0] vel_q;

  logic                       found;
  logic [NOTE_W-1:0]          sel;
  logic                       sel_on;

  // lowest pending key
  always_comb begin
    found  = 1'b0;
    sel    = '0;
    sel_on = 1'b0;
    for (int i = KEYS - 1; i >= 0; i--) begin
      if (pend_on[i] || pend_off[i]) begin
        found  = 1'b1;
        sel    = NOTE_W'(i);
        sel_on = pend_on[i] && !(pend_off[i] && off_first[i]);
      end
    end
  end

  assign ev_valid = found;
  assign ev.on    = sel_on;
  assign ev.note  = sel;
  assign ev.vel   = sel_on ? vel_q[sel] : '0;
  assign pending  = pend_on | pend_off;

  // one-hot: the key whose event leaves this clock
  logic [KEYS-1:0] sent_on, sent_off;
  always_comb begin
    sent_on  = '0;
    sent_off = '0;
    for (int i = 0; i < KEYS; i++) begin
      sent_on[i]  = found && ev_ready && (sel == NOTE_W'(i)) &&  sel_on;
      sent_off[i] = found && ev_ready && (sel == NOTE_W'(i)) && !sel_on;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_down <= '0;
      pend_on   <= '0;
      pend_off  <= '0;
      off_first <= '0;
      vel_q     <= '0;
    end else begin
      prev_down <= key_down;
      for (int i = 0; i < KEYS; i++) begin
        if (key_down[i] && !prev_down[i]) begin
          pend_on[i] <= 1'b1;
          if (!pend_off[i] || sent_off[i]) off_first[i] <= 1'b0;
          vel_q[i]   <= key_vel[i];
        end else if (sent_on[i]) begin
          pend_on[i] <= 1'b0;
        end
        if (!key_down[i] && prev_down[i]) begin
          pend_off[i] <= 1'b1;
          if (!pend_on[i] || sent_on[i]) off_first[i] <= 1'b1;
        end else if (sent_off[i]) begin
          pend_off[i] <= 1'b0;
        end
      end
    end
  end

endmodule
