// sync_stable: brings a bundle of signals from another board's clock into
// this clock and says when the bundle has settled.
//
// The key bus is asynchronous: master and slaves run on their own clocks and
// only look at each other's lines. Each bit passes through two flip-flops
// (metastability guard) and a third stage; `q` is the third stage and
// `stable` is high when the second and third stages agree, i.e. the whole
// bundle has read the same value on two consecutive clocks. A sender changes
// its lines at most once per handshake step, so a bundle that is stable is
// free of the mixed old/new values that bits arriving one clock apart would
// otherwise show. Latency: a change at `d` reaches `q` after 3 clocks and is
// reported stable from then on. Reset loads RST_VAL into every stage.
module sync_stable #(
  parameter int unsigned W       = 1,
  parameter logic [W-1:0] RST_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         stable
);

  logic [W-1:0] s1, s2, s3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= RST_VAL;
      s2 <= RST_VAL;
      s3 <= RST_VAL;
    end else begin
      s1 <= d;
      s2 <= s1;
      s3 <= s2;
    end
  end

  assign q      = s3;
  assign stable = (s2 == s3);

endmodule
