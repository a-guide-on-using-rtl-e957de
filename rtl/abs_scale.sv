// abs_scale: rectify and scale the sweep sine ("Absolute" then "CMult1 x100").
//
// The signed DDS sine has IN_W-2 fraction bits, so +/-1.0 is +/-2^(IN_W-2).
// Its magnitude is multiplied by SCALE and rounded half-up to an integer:
// limit = (|sine| * SCALE + 2^(IN_W-3)) >> (IN_W-2). For 6-bit input and
// SCALE = 100 the output runs 0..100 with one arch per half sine period.
// The stages and the x100 come from the reference design; the number format and
// half-up rounding are this design's choice. Purely combinational.
module abs_scale #(
  parameter int unsigned IN_W  = 6,
  parameter int unsigned SCALE = 100,
  localparam int unsigned OUT_W = $clog2(SCALE + 1)
) (
  input  logic signed [IN_W-1:0]  sine,
  output logic        [OUT_W-1:0] limit
);
  localparam int unsigned FRAC = IN_W - 2;
  localparam int unsigned PW   = IN_W + $clog2(SCALE + 1) + 1;

  logic [IN_W-1:0] mag;
  logic [PW-1:0]   prod;

  always_comb begin
    mag  = sine[IN_W-1] ? IN_W'(-sine) : IN_W'(sine);
    prod = PW'(mag) * PW'(SCALE) + PW'(1 << (FRAC - 1));
    limit = OUT_W'(prod >> FRAC);
  end
endmodule
