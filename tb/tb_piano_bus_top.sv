// tb_piano_bus_top: the whole 88-key system, all parameters at their
// defaults (4 boards x 22 keys, serial note-on), master clock 10 ns, board
// clock 13 ns. A key model plays:
//   1. one key on an idle system (latency from key-down to MIDI bytes);
//   2. a three-key chord across three boards in one clock;
//   3. 400 random key moves over all 88 keys;
//   4. all 88 keys pressed in one clock (queues fill, keys wait), then
//      all released in one clock.
// Every MIDI message is checked against the per-key history kept here:
// status byte, MIDI note 21 + key, velocity, order. The test counts each
// mechanism of the design (note-on, note-off, empty poll, round-robin
// wrap, a full queue holding keys back, messages from every board, the
// separate velocity step of a note-on) and
// fails any that never happened; bus contention, protocol errors and MIDI
// range errors must never happen. It also checks the single-key latency
// against the worst-case poll round, and that the 88-key burst needs at
// most 220 master clocks per message (300 messages per ms at 66 MHz).
module tb_piano_bus_top;
  import piano_pkg::*;
  localparam int NS = 4, KPS = 22, NK = NS * KPS, P = 16, DEPTH = 16;
  logic clk_m = 0, clk_s = 0, rst_n = 0;
  logic [NK-1:0] key_down = '0;
  logic [NK-1:0][VEL_W-1:0] key_vel = '0;
  logic midi_valid;
  logic [2:0][7:0] midi_bytes;
  logic [1:0] ss;
  logic ack;
  logic [1:0] bus_ctrl;
  logic bus_contention, proto_error, midi_range_error;
  logic [NS-1:0][$clog2(DEPTH+1)-1:0] fifo_count;
  logic [NK-1:0] keys_pending;
  int checks = 0, failures = 0;

  piano_bus_top dut (.*);

  always #5 clk_m = ~clk_m;
  always #6.5 clk_s = ~clk_s;

  typedef struct packed { logic on; logic [VEL_W-1:0] vel; } kev_t;
  kev_t kexp [NK][$];
  int n_on = 0, n_off = 0, n_empty = 0, n_wrap = 0, n_full_wait = 0;
  int n_board [NS] = '{0, 0, 0, 0};
  int n_vel_code = 0;
  int n_contention = 0, n_proto = 0, n_range = 0, n_msgs = 0;
  longint t_msg = 0;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int outstanding();
    int n = 0;
    for (int k = 0; k < NK; k++) n += kexp[k].size();
    return n;
  endfunction

  // MIDI checker
  always @(posedge clk_m) if (rst_n && midi_valid) begin
    int key;
    bit on;
    kev_t e;
    n_msgs++;
    t_msg = $time;
    on  = (midi_bytes[0] == 8'h90);
    key = int'(midi_bytes[1]) - 21;
    checks++;
    if (!(midi_bytes[0] == 8'h90 || midi_bytes[0] == 8'h80) || key < 0 || key >= NK) begin
      failures++; $display("FAIL bad MIDI message %h %h %h", midi_bytes[0], midi_bytes[1], midi_bytes[2]);
    end else if (kexp[key].size() == 0) begin
      failures++; $display("FAIL unexpected message for key %0d", key);
    end else begin
      e = kexp[key].pop_front();
      if (e.on != on || midi_bytes[2] != (on ? {1'b0, e.vel} : 8'd64)) begin
        failures++;
        $display("FAIL key %0d: got %h %h %h, expected on=%0d vel=%0d", key,
                 midi_bytes[0], midi_bytes[1], midi_bytes[2], e.on, e.vel);
      end
      if (on) n_on++; else n_off++;
      n_board[key / KPS]++;
    end
  end

  // mechanism counters
  logic [1:0] ss_q;
  logic ack_q;
  bit acked_in_slot = 0;
  always @(posedge clk_m) if (rst_n) begin
    if (ack != ack_q) acked_in_slot = 1;
    if (ss != ss_q) begin
      if (!acked_in_slot) n_empty++;
      if (ss_q == 2'd3 && ss == 2'd0) n_wrap++;
      acked_in_slot = 0;
    end
    ss_q  <= ss;
    ack_q <= ack;
    if (bus_ctrl == CTRL_VELOCITY) n_vel_code++;
    if (bus_contention) n_contention++;
    if (proto_error) n_proto++;
    if (midi_range_error) n_range++;
  end
  always @(posedge clk_s) if (rst_n)
    for (int b = 0; b < NS; b++)
      if (fifo_count[b] == DEPTH && keys_pending[b*KPS +: KPS] != 0) n_full_wait++;

  task automatic move(int k, bit on, int v);
    kev_t e;
    e.on = on; e.vel = on ? VEL_W'(v) : '0;
    kexp[k].push_back(e);
    key_down[k] = on;
    key_vel[k] = e.vel;
  endtask

  task automatic drain();
    while (outstanding() > 0) @(negedge clk_m);
    repeat (50) @(negedge clk_m);
  endtask

  longint t0, lat, burst;
  initial begin
    repeat (3) @(posedge clk_m);
    rst_n = 1;
    repeat (200) @(negedge clk_m);
    // 1. single key, idle system
    @(negedge clk_s); move(40, 1, 90); t0 = $time;
    drain();
    lat = (t_msg - t0) / 10;
    // worst case: a full round of empty polls plus the note-on slot and synchronisers
    check(lat <= NS * (P + 1) + 45, $sformatf("single-key latency %0d master clocks", lat));
    $display("single key-down to MIDI: %0d master clocks", lat);
    @(negedge clk_s); move(40, 0, 0);
    drain();
    // 2. chord across three boards in one clock
    @(negedge clk_s); move(5, 1, 30); move(30, 1, 60); move(75, 1, 127); t0 = $time;
    drain();
    $display("three-key chord, last MIDI after %0d master clocks", (t_msg - t0) / 10);
    check((t_msg - t0) / 10 <= NS * (P + 1) + 3 * 45, "chord latency");
    @(negedge clk_s); move(5, 0, 0); move(30, 0, 0); move(75, 0, 0);
    drain();
    // 3. random playing
    for (int n = 0; n < 400; n++) begin
      int k;
      @(negedge clk_s);
      k = $urandom_range(NK - 1);
      if (kexp[k].size() == 0) move(k, !key_down[k], $urandom_range(1, 127));
      repeat ($urandom_range(0, 20)) @(negedge clk_s);
    end
    drain();
    for (int k = 0; k < NK; k++) if (key_down[k]) move(k, 0, 0);
    drain();
    // 4. all keys at once
    @(negedge clk_s);
    for (int k = 0; k < NK; k++) move(k, 1, (k % 127) + 1);
    t0 = $time;
    begin
      int m0;
      m0 = n_msgs;
      drain();
      burst = (t_msg - t0) / 10;
      $display("88 simultaneous note-ons delivered in %0d master clocks (%0d per message)",
               burst, burst / (n_msgs - m0));
      // 300 MIDI messages per ms at a 66 MHz clock allows 220 clocks each
      check(n_msgs - m0 == NK, "burst: one message per key");
      check(burst <= 220 * NK, $sformatf("burst throughput %0d clocks for %0d messages", burst, NK));
    end
    @(negedge clk_s);
    for (int k = 0; k < NK; k++) move(k, 0, 0);
    drain();
    // results
    check(outstanding() == 0, "every key move delivered");
    check(n_on > 0,  $sformatf("note-on messages: %0d", n_on));
    check(n_off > 0, $sformatf("note-off messages: %0d", n_off));
    check(n_empty > 0, $sformatf("empty polls: %0d", n_empty));
    check(n_wrap > 0, $sformatf("round-robin wraps: %0d", n_wrap));
    check(n_full_wait > 0, $sformatf("board clocks with full queue and waiting keys: %0d", n_full_wait));
    for (int b = 0; b < NS; b++) check(n_board[b] > 0, $sformatf("messages from board %0d: %0d", b, n_board[b]));
    check(n_vel_code > 0, $sformatf("clocks with a velocity step on the bus: %0d", n_vel_code));
    check(n_contention == 0, "no bus contention");
    check(n_proto == 0, "no protocol errors");
    check(n_range == 0, "no MIDI range errors");
    $display("note-on %0d, note-off %0d, empty polls %0d, wraps %0d, full-queue clocks %0d, boards %0d/%0d/%0d/%0d",
             n_on, n_off, n_empty, n_wrap, n_full_wait, n_board[0], n_board[1], n_board[2], n_board[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
