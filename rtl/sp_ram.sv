// sp_ram: single-port block RAM, read-before-write, latency 1.
//
// This is the delay line of both effects. On a clock with `en` high the word
// at `addr` is read into `dout` and, when `we` is high, `din` is written to
// the same address; because the read happens before the write, `dout` shows
// the old contents one access later. Depth 10000, block RAM, read-before-write,
// latency 1 and all-zero initial contents follow the reference design's memory
// configuration; the enable port (used for the sample enable) is this
// design's addition. There is no output reset: `dout` is undefined until the
// first enabled access, and users must not rely on it before then.
module sp_ram #(
  parameter int unsigned DEPTH = 10000,
  parameter int unsigned W     = 18,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  dout
);
  logic [W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      dout <= mem[addr];
      if (we) mem[addr] <= din;
    end
  end
endmodule
