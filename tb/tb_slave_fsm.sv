// tb_slave_fsm: plays the master against two slave FSMs, one with the
// serial note-on (ID 1) and one with the dedicated velocity bus (ID 2),
// each with its own queue model. It checks: no drive when not selected;
// no-data for an empty queue; a note-off as one step; a note-on as note
// number then velocity (or one step with VEL); one message per select
// cycle; an event kept when the master moves away before the last ACK;
// and that the slave answers within 5 of its clocks.
module tb_slave_fsm;
  import piano_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] ss = 2'd0;
  logic ack = 0;
  logic [1:0] q_empty, q_pop, drive;
  key_event_t q_head [2];
  ctrl_e ctrl [2];
  logic [DATA_W-1:0] data [2];
  logic [VEL_W-1:0] vel [2];
  key_event_t q0[$], q1[$];
  int pops [2] = '{0, 0};
  int checks = 0, failures = 0;

  slave_fsm #(.SLAVE_ID(2'd1), .DEDICATED_VEL_BUS(1'b0)) dut_s (
    .clk, .rst_n, .ss, .ack, .q_empty(q_empty[0]), .q_head(q_head[0]), .q_pop(q_pop[0]),
    .drive(drive[0]), .ctrl(ctrl[0]), .data(data[0]), .vel(vel[0]));
  slave_fsm #(.SLAVE_ID(2'd2), .DEDICATED_VEL_BUS(1'b1)) dut_d (
    .clk, .rst_n, .ss, .ack, .q_empty(q_empty[1]), .q_head(q_head[1]), .q_pop(q_pop[1]),
    .drive(drive[1]), .ctrl(ctrl[1]), .data(data[1]), .vel(vel[1]));

  always #5 clk = ~clk;

  // queue models
  always @(posedge clk) begin
    if (q_pop[0] && q0.size() > 0) begin void'(q0.pop_front()); pops[0]++; end
    if (q_pop[1] && q1.size() > 0) begin void'(q1.pop_front()); pops[1]++; end
  end
  always @(negedge clk) begin
    q_empty[0] = (q0.size() == 0); q_head[0] = q0.size() ? q0[0] : '0;
    q_empty[1] = (q1.size() == 0); q_head[1] = q1.size() ? q1[0] : '0;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic key_event_t mk(bit on, int note, int v);
    key_event_t e;
    e.on = on; e.note = NOTE_W'(note); e.vel = VEL_W'(v);
    return e;
  endfunction

  // wait up to `lim` clocks for slave i to show ctrl c; return clocks taken
  task automatic wait_ctrl(int i, ctrl_e c, int lim, output int took);
    took = 0;
    while (ctrl[i] != c && took < lim) begin @(posedge clk); took++; end
    #1;
  endtask

  task automatic select(logic [1:0] id);
    @(negedge clk); ss = id;
  endtask

  task automatic toggle_ack();
    @(negedge clk); ack = ~ack;
  endtask

  int t;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    check(drive == 2'b00, "idle: no drive");
    // --- empty queue: no-data while selected
    select(2'd1);
    repeat (5) @(posedge clk); #1;
    check(drive == 2'b01 && ctrl[0] == CTRL_NO_DATA, "empty queue answers no-data");
    select(2'd0);
    repeat (5) @(posedge clk); #1;
    check(drive == 2'b00, "released after deselect");
    // --- note-off then note-on, serial slave
    q0.push_back(mk(0, 7, 0));
    q0.push_back(mk(1, 19, 99));
    select(2'd1);
    wait_ctrl(0, CTRL_NOTE_OFF, 20, t);
    check(ctrl[0] == CTRL_NOTE_OFF && data[0] == 7, "note-off with note number");
    check(t <= 5, $sformatf("answer within 5 clocks (took %0d)", t));
    toggle_ack();
    wait_ctrl(0, CTRL_NO_DATA, 20, t);
    check(ctrl[0] == CTRL_NO_DATA && pops[0] == 1, "note-off done, popped");
    repeat (20) @(posedge clk); #1;
    check(ctrl[0] == CTRL_NO_DATA && drive[0], "one message per select cycle");
    select(2'd2);                        // other slave, empty queue
    repeat (6) @(posedge clk); #1;
    check(drive == 2'b10 && ctrl[1] == CTRL_NO_DATA, "only the selected slave drives");
    select(2'd1);
    wait_ctrl(0, CTRL_NOTE_ON, 20, t);
    check(ctrl[0] == CTRL_NOTE_ON && data[0] == 19, "note-on with note number");
    toggle_ack();
    wait_ctrl(0, CTRL_VELOCITY, 20, t);
    check(ctrl[0] == CTRL_VELOCITY && data[0] == 99 && pops[0] == 1, "velocity after first ACK");
    toggle_ack();
    wait_ctrl(0, CTRL_NO_DATA, 20, t);
    check(ctrl[0] == CTRL_NO_DATA && pops[0] == 2, "note-on done after second ACK");
    select(2'd3);
    repeat (6) @(posedge clk);
    // --- abort: master leaves before the velocity is acknowledged
    q0.push_back(mk(1, 4, 12));
    select(2'd1);
    wait_ctrl(0, CTRL_NOTE_ON, 20, t);
    toggle_ack();
    wait_ctrl(0, CTRL_VELOCITY, 20, t);
    select(2'd0);
    repeat (6) @(posedge clk); #1;
    check(drive[0] == 0 && pops[0] == 2 && q0.size() == 1, "abort keeps the event");
    select(2'd1);
    wait_ctrl(0, CTRL_NOTE_ON, 20, t);
    check(ctrl[0] == CTRL_NOTE_ON && data[0] == 4, "event resent after abort");
    toggle_ack();
    wait_ctrl(0, CTRL_VELOCITY, 20, t);
    check(data[0] == 12, "resent velocity");
    toggle_ack();
    wait_ctrl(0, CTRL_NO_DATA, 20, t);
    check(pops[0] == 3 && q0.size() == 0, "resent event popped once");
    // --- dedicated velocity bus slave
    q1.push_back(mk(1, 21, 127));
    q1.push_back(mk(0, 21, 0));
    select(2'd2);
    wait_ctrl(1, CTRL_NOTE_ON, 20, t);
    check(ctrl[1] == CTRL_NOTE_ON && data[1] == 21 && vel[1] == 127, "dedicated: note and velocity together");
    toggle_ack();
    wait_ctrl(1, CTRL_NO_DATA, 20, t);
    check(ctrl[1] == CTRL_NO_DATA && pops[1] == 1, "dedicated: note-on complete after one ACK");
    select(2'd0);
    repeat (6) @(posedge clk);
    select(2'd2);
    wait_ctrl(1, CTRL_NOTE_OFF, 20, t);
    check(ctrl[1] == CTRL_NOTE_OFF && data[1] == 21, "dedicated: note-off");
    toggle_ack();
    wait_ctrl(1, CTRL_NO_DATA, 20, t);
    check(pops[1] == 2, "dedicated: note-off popped");
    check(drive[0] == 0, "serial slave silent while 2 selected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
