// fx_mixer: Y = X + a * delayed, the output stage of both effects.
//
// The delayed sample `d` is multiplied by the unsigned Q1.15 gain `a`
// (0.8 for the echo, 1.0 for the flanger), the product is shifted back to
// sample scale with truncation toward minus infinity, and the current sample
// `x` is added. The sum is clamped to the W-bit two's-complement range and
// `sat` flags a clamp. The equation and the 18-bit output are the reference design's;
// the number format, truncation and saturation are this design's choice.
// Purely combinational.
module fx_mixer
  import fx_pkg::*;
#(
  parameter int unsigned W = SAMPLE_W
) (
  input  logic signed [W-1:0]      x,
  input  logic signed [W-1:0]      d,
  input  logic        [GAIN_W-1:0] gain,
  output logic signed [W-1:0]      y,
  output logic                     sat
);
  localparam int unsigned PW = W + GAIN_W + 1;
  localparam logic signed [W+1:0] MAXV = (W+2)'((1 << (W - 1)) - 1);
  localparam logic signed [W+1:0] MINV = -(W+2)'(1 << (W - 1));

  logic signed [PW-1:0]  prod;
  logic signed [W+1:0]   sum;

  always_comb begin
    prod = PW'(d) * $signed({1'b0, gain});
    sum  = (W+2)'(x) + (W+2)'(prod >>> GAIN_FRAC);
    sat  = 1'b0;
    if (sum > MAXV) begin
      y   = MAXV[W-1:0];
      sat = 1'b1;
    end else if (sum < MINV) begin
      y   = MINV[W-1:0];
      sat = 1'b1;
    end else begin
      y = sum[W-1:0];
    end
  end
endmodule
