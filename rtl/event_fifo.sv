// event_fifo: the buffer queue of a slave board.
//
// Key events wait here until the master selects the board. It is a
// show-ahead FIFO on a register array: `rd_data` is the oldest entry
// whenever `empty` is low, and `rd_en` removes it at the clock edge. The
// slave FSM removes an event only after the master has acknowledged all of
// it, so an interrupted transfer is repeated in the next select cycle.
// A write while full is refused (the writer is expected to hold its event
// until `full` drops) and sets the sticky `overflow` flag. A simultaneous
// read and write is allowed, also when full. The queue itself is named by
// the design; its depth and write policy are choices made here.
module event_fifo #(
  parameter int unsigned WIDTH = piano_pkg::EVENT_W,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic             overflow
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign empty = (count == 0);
  assign full  = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign do_rd = rd_en && !empty;
  assign do_wr = wr_en && (!full || do_rd);
  assign rd_data = mem[rptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wptr <= next_ptr(wptr);
      if (do_rd) rptr <= next_ptr(rptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
      if (wr_en && !do_wr) overflow <= 1'b1;
    end
  end

endmodule
