// tb_key_monitor: presses and releases keys of a 22-key board, sometimes
// several in one clock and while the queue reports full, and checks the
// sequence of accepted events against one worked out here: lowest key
// first, a key's two pending events in the order they happened, velocity
// taken at the press, and nothing lost while `ev_ready` is low.
module tb_key_monitor;
  import piano_pkg::*;
  localparam int K = 22;
  logic clk = 0, rst_n = 0;
  logic [K-1:0] key_down = '0;
  logic [K-1:0][VEL_W-1:0] key_vel = '0;
  logic ev_valid, ev_ready = 1;
  key_event_t ev;
  logic [K-1:0] pending;
  int checks = 0, failures = 0;
  key_event_t got[$];
  key_event_t exp_q[$];
  int held = 0;

  key_monitor #(.KEYS(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // record accepted events
  always @(posedge clk) if (rst_n && ev_valid && ev_ready) got.push_back(ev);
  always @(posedge clk) if (rst_n && ev_valid && !ev_ready) held++;

  function automatic key_event_t mk(bit on, int note, int vel);
    key_event_t e;
    e.on = on; e.note = NOTE_W'(note); e.vel = on ? VEL_W'(vel) : '0;
    return e;
  endfunction

  task automatic press(int k, int v);
    key_down[k] = 1'b1; key_vel[k] = VEL_W'(v);
  endtask

  task automatic wait_idle();
    repeat (2) @(posedge clk);
    while (pending != 0) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    // 1: one press, one release
    @(negedge clk); press(5, 100);
    @(negedge clk); key_vel[5] = 7'd3;          // later velocity is ignored
    exp_q.push_back(mk(1, 5, 100));
    wait_idle();
    @(negedge clk); key_down[5] = 0;
    exp_q.push_back(mk(0, 5, 0));
    wait_idle();
    // 2: three keys in one clock while the queue is full
    @(negedge clk); ev_ready = 0; press(17, 20); press(3, 127); press(21, 1);
    repeat (6) @(negedge clk);
    check(pending == ((1 << 17) | (1 << 3) | (1 << 21)), "pending while full");
    ev_ready = 1;
    exp_q.push_back(mk(1, 3, 127)); exp_q.push_back(mk(1, 17, 20)); exp_q.push_back(mk(1, 21, 1));
    wait_idle();
    // 3: press and release of one key before it could be sent
    @(negedge clk); ev_ready = 0; press(9, 55);
    @(negedge clk); @(negedge clk); key_down[9] = 0;
    @(negedge clk); @(negedge clk); ev_ready = 1;
    exp_q.push_back(mk(1, 9, 55)); exp_q.push_back(mk(0, 9, 0));
    wait_idle();
    // 4: release all held keys at once
    @(negedge clk); key_down = '0;
    exp_q.push_back(mk(0, 3, 0)); exp_q.push_back(mk(0, 17, 0)); exp_q.push_back(mk(0, 21, 0));
    wait_idle();
    // 5: release and press again before the release was sent
    @(negedge clk); press(12, 90);
    exp_q.push_back(mk(1, 12, 90));
    wait_idle();
    @(negedge clk); ev_ready = 0; key_down[12] = 0;
    @(negedge clk); @(negedge clk); press(12, 30);
    @(negedge clk); @(negedge clk); ev_ready = 1;
    exp_q.push_back(mk(0, 12, 0)); exp_q.push_back(mk(1, 12, 30));
    wait_idle();
    @(negedge clk); key_down[12] = 0;
    exp_q.push_back(mk(0, 12, 0));
    wait_idle();
    // 6: all 22 keys pressed together, random ready
    @(negedge clk);
    for (int k = 0; k < K; k++) begin press(k, k + 40); exp_q.push_back(mk(1, k, k + 40)); end
    for (int n = 0; n < 100; n++) begin @(negedge clk); ev_ready = $urandom_range(1); end
    ev_ready = 1;
    wait_idle();
    check(got.size() == exp_q.size(), "event count");
    for (int i = 0; i < exp_q.size() && i < got.size(); i++)
      check(got[i] == exp_q[i], $sformatf("event %0d got %p exp %p", i, got[i], exp_q[i]));
    check(held > 0, "events held while not ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
