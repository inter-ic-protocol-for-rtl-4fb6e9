// tb_slave_device: one complete slave board (ID 1, 22 keys) against a
// behavioural master on an unrelated clock. Keys are pressed and released
// at random with random velocities; a burst presses all 22 keys in one clock
// so that the 16-entry queue fills and keys wait. The master polls board 1
// and, in between, another board number. Every received message is checked
// against the per-key history kept here: right key, right kind, right
// velocity, in the order the key moved, and nothing missing at the end.
module tb_slave_device;
  import piano_pkg::*;
  localparam int K = 22, DEPTH = 16;
  logic clk = 0, clk_m = 0, rst_n = 0;
  logic [K-1:0] key_down = '0;
  logic [K-1:0][VEL_W-1:0] key_vel = '0;
  logic [1:0] ss = 2'd0;
  logic ack = 0;
  logic drive;
  ctrl_e ctrl;
  logic [DATA_W-1:0] data;
  logic [VEL_W-1:0] vel;
  logic [$clog2(DEPTH+1)-1:0] fifo_count;
  logic [K-1:0] keys_pending;
  int checks = 0, failures = 0;

  slave_device #(.KEYS(K), .SLAVE_ID(2'd1), .FIFO_DEPTH(DEPTH)) dut (
    .clk, .rst_n, .key_down, .key_vel, .ss, .ack,
    .drive, .ctrl, .data, .vel, .fifo_count, .keys_pending);

  always #5 clk = ~clk;
  always #4 clk_m = ~clk_m;

  typedef struct packed { logic on; logic [VEL_W-1:0] vel; } kev_t;
  kev_t kexp [K][$];
  int n_on = 0, n_off = 0, n_empty = 0, max_count = 0, full_wait = 0;
  bit done_keys = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) begin
    if (fifo_count > max_count) max_count = fifo_count;
    if (fifo_count == DEPTH && keys_pending != 0) full_wait++;
  end

  function automatic int outstanding();
    int n = 0;
    for (int k = 0; k < K; k++) n += kexp[k].size();
    return n;
  endfunction

  // wait for the bus to show c (with a limit), in master clocks
  task automatic wait_ctrl(ctrl_e c);
    int n = 0;
    while (ctrl != c && n < 200) begin @(posedge clk_m); n++; end
    check(ctrl == c, "expected bus code");
  endtask

  task automatic take(int note, bit on, int v);
    kev_t e;
    checks++;
    if (note >= K || kexp[note].size() == 0) begin
      failures++; $display("FAIL unexpected message key %0d at %0t", note, $time);
    end else begin
      e = kexp[note].pop_front();
      if (e.on != on || (on && e.vel != VEL_W'(v))) begin
        failures++;
        $display("FAIL key %0d got on=%0d vel=%0d expected on=%0d vel=%0d", note, on, v, e.on, e.vel);
      end
    end
  endtask

  // behavioural master polling board `id`
  task automatic poll(logic [1:0] id);
    int note;
    @(negedge clk_m); ss = id;
    repeat (16) @(posedge clk_m);
    #1;
    if (id != 2'd1) begin
      check(!drive, "board silent when another is selected");
      return;
    end
    check(drive, "selected board drives");
    case (ctrl)
      CTRL_NO_DATA: n_empty++;
      CTRL_NOTE_OFF: begin
        note = data;
        @(negedge clk_m); ack = ~ack;
        wait_ctrl(CTRL_NO_DATA);
        take(note, 0, 0); n_off++;
      end
      CTRL_NOTE_ON: begin
        note = data;
        @(negedge clk_m); ack = ~ack;
        wait_ctrl(CTRL_VELOCITY);
        take(note, 1, data);
        @(negedge clk_m); ack = ~ack;
        wait_ctrl(CTRL_NO_DATA);
        n_on++;
      end
      default: check(0, "velocity code at start of message");
    endcase
  endtask

  initial begin : master
    wait (rst_n);
    while (!done_keys || outstanding() > 0) begin
      poll(2'd1);
      poll(2'($urandom_range(1) ? 0 : 3));
    end
  end

  initial begin : keys
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    // random playing: toggle a key whose previous move has been delivered
    for (int n = 0; n < 300; n++) begin
      int k;
      @(negedge clk);
      k = $urandom_range(K - 1);
      if (kexp[k].size() == 0) begin
        kev_t e;
        e.on = !key_down[k];
        e.vel = e.on ? VEL_W'($urandom_range(1, 127)) : '0;
        key_vel[k] = e.vel;
        key_down[k] = e.on;
        kexp[k].push_back(e);
      end
      repeat ($urandom_range(0, 30)) @(negedge clk);
    end
    while (outstanding() > 0) @(negedge clk);
    // burst: release all, then press all 22 in one clock
    @(negedge clk);
    for (int k = 0; k < K; k++) if (key_down[k]) begin
      kev_t e; e.on = 0; e.vel = 0; kexp[k].push_back(e); key_down[k] = 0;
    end
    while (outstanding() > 0) @(negedge clk);
    @(negedge clk);
    for (int k = 0; k < K; k++) begin
      kev_t e; e.on = 1; e.vel = VEL_W'(k + 100); kexp[k].push_back(e);
      key_down[k] = 1; key_vel[k] = e.vel;
    end
    done_keys = 1;
    while (outstanding() > 0) @(negedge clk);
    repeat (100) @(negedge clk);
    check(outstanding() == 0, "all key moves delivered");
    check(fifo_count == 0 && keys_pending == 0, "board drained");
    check(max_count == DEPTH && full_wait > 0, "queue filled and keys waited");
    check(n_on > 0 && n_off > 0 && n_empty > 0, "note-on, note-off and empty polls seen");
    $display("note-on %0d note-off %0d empty polls %0d, clocks with full queue and waiting keys %0d",
             n_on, n_off, n_empty, full_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
