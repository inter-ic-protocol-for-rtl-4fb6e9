// shared_bus: the CTRL/DATA/VEL lines that all slave boards share.
//
// Only the board that the master has selected drives the lines; the others
// let go. This block models those lines as gated OR logic: each board's
// values count only while its `drive` is high, and with no board driving the
// lines read no-data and zero, as pull resistors would hold them. Two boards
// driving at once is a fault of the select protocol: `contention` goes high
// (the system top asserts that this never happens out of reset). The bus is combinational (no delay). The
// shared bus itself follows the design; the idle value and the contention
// flag are choices made here.
module shared_bus
  import piano_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]             drive,
  input  logic [N-1:0][1:0]        ctrl_in,
  input  logic [N-1:0][DATA_W-1:0] data_in,
  input  logic [N-1:0][VEL_W-1:0]  vel_in,
  output ctrl_e                    ctrl,
  output logic [DATA_W-1:0]        data,
  output logic [VEL_W-1:0]         vel,
  output logic                     contention
);

  logic [1:0] ctrl_or;
  int unsigned n_drv;

  always_comb begin
    ctrl_or = '0;
    data    = '0;
    vel     = '0;
    n_drv   = 0;
    for (int i = 0; i < N; i++) begin
      if (drive[i]) begin
        ctrl_or = ctrl_or | ctrl_in[i];
        data    = data    | data_in[i];
        vel     = vel     | vel_in[i];
        n_drv   = n_drv + 1;
      end
    end
    ctrl = (n_drv == 0) ? CTRL_NO_DATA : ctrl_e'(ctrl_or);
  end

  assign contention = (n_drv > 1);

endmodule
