// tb_midi_encoder: drives random note messages from every board and checks
// the three MIDI bytes one clock later against numbers computed here
// (status 0x90/0x80 with the channel, global note 21 + 22*board + key,
// velocity or release velocity 64), plus the range flag for key numbers
// that map above MIDI note 127.
module tb_midi_encoder;
  import piano_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_on = 0;
  logic [1:0] in_slave = 0;
  logic [NOTE_W-1:0] in_note = 0;
  logic [VEL_W-1:0] in_vel = 0;
  logic out_valid, range_error;
  logic [2:0][7:0] out_bytes;
  int checks = 0, failures = 0;

  midi_encoder #(.CHANNEL(4'd3)) dut (.*);

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

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      int key;
      bit v;
      @(negedge clk);
      v        = ($urandom_range(3) != 0);
      in_valid = v;
      in_on    = $urandom_range(1);
      in_slave = $urandom_range(3);
      in_note  = (n % 50 == 0) ? 5'd31 : NOTE_W'($urandom_range(21));
      in_vel   = $urandom_range(127);
      key = 21 + 22 * in_slave + in_note;
      @(posedge clk);
      #1;
      if (v && key <= 127) begin
        check(out_valid == 1 && range_error == 0, "valid");
        check(out_bytes[0] == (in_on ? 8'h93 : 8'h83), "status");
        check(out_bytes[1] == key, "note");
        check(out_bytes[2] == (in_on ? {1'b0, in_vel} : 8'd64), "velocity");
      end else if (v) begin
        check(out_valid == 0 && range_error == 1, "range");
      end else begin
        check(out_valid == 0 && range_error == 0, "idle");
      end
    end
    // corner keys: A0 and C8
    @(negedge clk); in_valid = 1; in_on = 1; in_slave = 0; in_note = 0; in_vel = 1;
    @(posedge clk); #1 check(out_bytes[1] == 8'd21, "A0 = 21");
    @(negedge clk); in_slave = 3; in_note = 21;
    @(posedge clk); #1 check(out_bytes[1] == 8'd108, "C8 = 108");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
