// flanger_counter: address counter with a swept wrap point.
//
// A comparator checks `count > limit`; when true the counter returns to 0 on
// the next enabled step, otherwise it increments. With a steady limit L the
// count runs 0, 1, ..., L+1 and the RAM addresses repeat every L+2 steps,
// which sets the flanger delay. `limit` is the rectified, scaled sine (0..100),
// so the delay sweeps with it. The comparator-drives-reset structure is the
// reference design's; the exact step at which the reset lands is this design's
// reading of it. W is the shared RAM's address width.
module flanger_counter #(
  parameter int unsigned W   = 14,
  parameter int unsigned LW  = 7
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic [LW-1:0] limit,
  output logic [W-1:0]  count
);
  logic over;
  assign over = (count > W'(limit));

  always_ff @(posedge clk) begin
    if (rst)
      count <= '0;
    else if (en)
      count <= over ? '0 : count + 1'b1;
  end
endmodule
