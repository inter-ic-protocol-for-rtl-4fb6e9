// tb_shared_bus: checks the shared lines for no driver (idle no-data),
// each single driver (its values pass, the others are ignored). Two
// drivers do not occur here: an assertion inside the bus reports them.
module tb_shared_bus;
  import piano_pkg::*;
  logic [3:0] drive;
  logic [3:0][1:0] ctrl_in;
  logic [3:0][DATA_W-1:0] data_in;
  logic [3:0][VEL_W-1:0] vel_in;
  ctrl_e ctrl;
  logic [DATA_W-1:0] data;
  logic [VEL_W-1:0] vel;
  logic contention;
  int checks = 0, failures = 0;

  shared_bus #(.N(4)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < 4; i++) begin
        ctrl_in[i] = $urandom_range(3);
        data_in[i] = $urandom;
        vel_in[i]  = $urandom;
      end
      drive = '0;
      #1;
      check(ctrl == CTRL_NO_DATA && data == 0 && vel == 0 && !contention, "idle bus");
      for (int i = 0; i < 4; i++) begin
        drive = 4'b1 << i;
        #1;
        check(ctrl == ctrl_e'(ctrl_in[i]) && data == data_in[i] && vel == vel_in[i], "single driver");
        check(!contention, "no contention");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
