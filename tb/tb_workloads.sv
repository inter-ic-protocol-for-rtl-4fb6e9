// tb_workloads: the 88-key system at default parameters under the loads a
// key scanner is judged by.
//   Polyphony: 1, 2 and 3 keys pressed in the same clock on random keys,
//   40 trials each; the delay from key-down to the last MIDI message is
//   measured and its minimum and maximum reported. The maximum must stay
//   within the protocol's worst case: one round of empty polls to reach the
//   board, then per key one note-on select cycle (under 2*POLL_CYCLES) and,
//   if the keys share a board, one more round over the other boards; plus a
//   margin of 20 clocks for synchronisers and MIDI encoding. This is far
//   below the 1 ms MIDI time resolution.
//   Sustained load: every key is pressed and released again as soon as its
//   previous move has arrived, for 40,000 master clocks; the mean number of
//   clocks per MIDI message must stay at or below 220, which is 300
//   messages per ms at a 66 MHz clock.
// All MIDI messages are also checked for the right key, kind and velocity.
module tb_workloads;
  import piano_pkg::*;
  localparam int NS = 4, KPS = 22, NK = NS * KPS, P = 16;
  logic clk_m = 0, clk_s = 0, rst_n = 0;
  logic [NK-1:0] key_down = '0;
  logic [NK-1:0][VEL_W-1:0] key_vel = '0;
  logic midi_valid;
  logic [2:0][7:0] midi_bytes;
  logic [1:0] ss;
  logic ack;
  logic [1:0] bus_ctrl;
  logic bus_contention, proto_error, midi_range_error;
  logic [NS-1:0][4:0] fifo_count;
  logic [NK-1:0] keys_pending;
  int checks = 0, failures = 0;

  piano_bus_top dut (.*);

  always #5 clk_m = ~clk_m;
  always #6.5 clk_s = ~clk_s;

  typedef struct packed { logic on; logic [VEL_W-1:0] vel; } kev_t;
  kev_t kexp [NK][$];
  int n_msgs = 0;
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

  always @(posedge clk_m) if (rst_n && midi_valid) begin
    int key;
    bit on;
    kev_t e;
    n_msgs++;
    t_msg = $time;
    on  = (midi_bytes[0] == 8'h90);
    key = int'(midi_bytes[1]) - 21;
    checks++;
    if (key < 0 || key >= NK || kexp[key].size() == 0) begin
      failures++; $display("FAIL unexpected MIDI message %h %h %h", midi_bytes[0], midi_bytes[1], midi_bytes[2]);
    end else begin
      e = kexp[key].pop_front();
      if (e.on != on || midi_bytes[2] != (on ? {1'b0, e.vel} : 8'd64)) begin
        failures++; $display("FAIL key %0d wrong message", key);
      end
    end
  end

  task automatic move(int k, bit on, int v);
    kev_t e;
    e.on = on; e.vel = on ? VEL_W'(v) : '0;
    kexp[k].push_back(e);
    key_down[k] = on;
    key_vel[k] = e.vel;
  endtask

  task automatic drain();
    while (outstanding() > 0) @(negedge clk_m);
    repeat (20) @(negedge clk_m);
  endtask

  initial begin
    longint t0, d, dmin, dmax;
    int keys [3];
    repeat (3) @(posedge clk_m);
    rst_n = 1;
    repeat (100) @(negedge clk_m);
    // polyphony
    for (int n = 1; n <= 3; n++) begin
      dmin = 1 << 30; dmax = 0;
      for (int trial = 0; trial < 40; trial++) begin
        for (int i = 0; i < n; i++) begin
          bit dup;
          do begin
            keys[i] = $urandom_range(NK - 1);
            dup = 0;
            for (int j = 0; j < i; j++) if (keys[j] == keys[i]) dup = 1;
          end while (dup);
        end
        repeat ($urandom_range(0, 80)) @(negedge clk_s);
        for (int i = 0; i < n; i++) move(keys[i], 1, $urandom_range(1, 127));
        t0 = $time;
        drain();
        d = (t_msg - t0) / 10;
        if (d < dmin) dmin = d;
        if (d > dmax) dmax = d;
        for (int i = 0; i < n; i++) move(keys[i], 0, 0);
        drain();
      end
      $display("%0d simultaneous note(s): key-down to last MIDI min %0d max %0d master clocks (%0d..%0d ns at 66 MHz)",
               n, dmin, dmax, dmin * 1000 / 66, dmax * 1000 / 66);
      check(dmax <= NS * (P + 1) + n * ((NS - 1) * (P + 1) + 2 * P) + 20, $sformatf("%0d-note worst-case delay", n));
      check(dmax * 1000 / 66 < 1000000, "below 1 ms at 66 MHz");
    end
    // sustained load
    begin
      int m0;
      longint t_start;
      m0 = n_msgs;
      t_start = $time;
      while (($time - t_start) / 10 < 40000) begin
        @(negedge clk_s);
        for (int k = 0; k < NK; k++)
          if (kexp[k].size() == 0) move(k, !key_down[k], $urandom_range(1, 127));
      end
      begin
        int msgs;
        msgs = n_msgs - m0;
        $display("sustained: %0d MIDI messages in 40000 master clocks, %0d clocks per message, %0d per ms at 66 MHz",
                 msgs, 40000 / msgs, msgs * 66000 / 40000);
        check(msgs > 0 && 40000 / msgs <= 220, "sustained rate of at least 300 messages per ms at 66 MHz");
      end
      for (int k = 0; k < NK; k++) if (kexp[k].size() == 0 && key_down[k]) move(k, 0, 0);
      drain();
      for (int k = 0; k < NK; k++) if (key_down[k]) move(k, 0, 0);
      drain();
    end
    check(outstanding() == 0, "every key move delivered");
    check(!bus_contention && n_msgs > 0, "sane end state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
