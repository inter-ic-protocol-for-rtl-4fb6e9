// tb_master_fsm: the master against four behavioural slaves on their own
// clock (period 13 against the master's 10). Each slave answers its select
// after three of its clocks and follows the slave protocol for a scripted
// list of note-on and note-off messages. Checks: the received messages,
// their order and their board numbers; strict round robin of SS; one ACK
// toggle per note-off and two per note-on; a poll of an empty board takes
// exactly POLL_CYCLES+1 master clocks; a note-on takes longer than a
// note-off, which takes longer than an empty poll; a velocity code where a
// note number belongs raises proto_error.
module tb_master_fsm;
  import piano_pkg::*;
  localparam int P = 16;
  logic clk = 0, clk_s = 0, rst_n = 0;
  logic [1:0] ss;
  logic ack;
  ctrl_e ctrl = CTRL_NO_DATA;
  logic [DATA_W-1:0] data = '0;
  logic [VEL_W-1:0] vel = '0;
  logic msg_valid, msg_on, proto_error;
  logic [1:0] msg_slave;
  logic [NOTE_W-1:0] msg_note;
  logic [VEL_W-1:0] msg_vel;
  int checks = 0, failures = 0;

  typedef struct packed { logic bad; logic on; logic [1:0] slave; logic [NOTE_W-1:0] note; logic [VEL_W-1:0] vel; } msg_t;
  msg_t sq [4][$];
  msg_t exp_q[$];
  int n_msgs = 0, n_toggles = 0, n_exp_toggles = 0, n_err = 0;
  int t_nodata = 0, t_off = 0, t_on = 0;

  master_fsm #(.POLL_CYCLES(P)) dut (.*);

  always #5 clk = ~clk;
  always #6.5 clk_s = ~clk_s;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // behavioural slaves sharing one bus
  initial begin : slaves
    logic [1:0] cur;
    logic a0;
    msg_t m;
    wait (rst_n);
    forever begin
      @(posedge clk_s);
      cur = ss;
      repeat (3) @(posedge clk_s);
      if (ss == cur) begin
        if (sq[cur].size() > 0) begin
          m = sq[cur].pop_front();
          a0 = ack;
          if (m.bad) begin
            ctrl = CTRL_VELOCITY; data = DATA_W'(m.vel);
            repeat (40) @(posedge clk_s);
          end else begin
            ctrl = m.on ? CTRL_NOTE_ON : CTRL_NOTE_OFF; data = DATA_W'(m.note);
            exp_q.push_back(m);
            n_exp_toggles += m.on ? 2 : 1;
            wait (ack != a0);
            repeat (3) @(posedge clk_s);
            if (m.on) begin
              a0 = ack;
              ctrl = CTRL_VELOCITY; data = DATA_W'(m.vel);
              wait (ack != a0);
              repeat (3) @(posedge clk_s);
            end
          end
        end
        ctrl = CTRL_NO_DATA; data = '0;
        wait (ss != cur);
      end
    end
  end

  // received messages
  always @(posedge clk) if (rst_n && msg_valid) begin
    msg_t e;
    n_msgs++;
    if (exp_q.size() == 0) check(0, "message with none expected");
    else begin
      e = exp_q.pop_front();
      check(msg_on == e.on && msg_slave == e.slave && msg_note == e.note &&
            (!e.on || msg_vel == e.vel), $sformatf("message %0d", n_msgs));
    end
  end
  always @(posedge clk) if (rst_n && proto_error) n_err++;

  // round robin and select durations
  logic [1:0] ss_prev;
  logic ack_prev;
  int since = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      since++;
      if (ack != ack_prev) n_toggles++;
      if (ss != ss_prev) begin
        check(ss == ss_prev + 2'd1, "round robin order");
        if (since > t_on) t_on = since;
        since = 0;
      end
    end
    ss_prev  <= ss;
    ack_prev <= ack;
  end

  function automatic msg_t mk(bit on, int s, int n, int v);
    msg_t m;
    m.bad = 0; m.on = on; m.slave = 2'(s); m.note = NOTE_W'(n); m.vel = VEL_W'(v);
    return m;
  endfunction

  // time one full select cycle of board s (from SS = s to SS = s+1)
  task automatic time_slot(int s, output int clocks);
    wait (ss == 2'(s));
    @(negedge clk);
    clocks = 0;
    while (ss == 2'(s)) begin @(negedge clk); clocks++; end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // empty polls
    time_slot(1, t_nodata);
    check(t_nodata == P + 1, $sformatf("empty poll takes POLL_CYCLES+1 clocks (%0d)", t_nodata));
    // one note-off, one note-on on board 2
    sq[2].push_back(mk(0, 2, 3, 0));
    time_slot(2, t_off);
    sq[2].push_back(mk(1, 2, 8, 77));
    time_slot(2, t_on);
    check(t_off > t_nodata && t_on > t_off, $sformatf("slot lengths no-data %0d < off %0d < on %0d", t_nodata, t_off, t_on));
    $display("select cycle in master clocks: no-data %0d, note-off %0d, note-on %0d", t_nodata, t_off, t_on);
    // random traffic on all boards
    for (int k = 0; k < 60; k++) begin
      int s = $urandom_range(3);
      sq[s].push_back(mk(1'($urandom_range(1)), s, $urandom_range(21), $urandom_range(127)));
    end
    // a protocol violation on board 3
    begin msg_t b; b = mk(1, 3, 0, 5); b.bad = 1; sq[3].push_back(b); end
    while (sq[0].size() + sq[1].size() + sq[2].size() + sq[3].size() > 0) @(posedge clk);
    repeat (300) @(posedge clk);
    check(exp_q.size() == 0, "all messages received");
    check(n_msgs == 62, $sformatf("message count %0d", n_msgs));
    check(n_toggles == n_exp_toggles, $sformatf("ACK toggles %0d expected %0d", n_toggles, n_exp_toggles));
    check(n_err == 1, "protocol error flagged once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
