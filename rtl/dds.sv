// dds: direct digital synthesiser for the flanger sweep.
//
// A PHASE_W-bit phase accumulator adds the tuning word `delta` (delta_theta)
// on every enabled step and wraps naturally, so the sine frequency is
// F_out = delta * F_step / 2^PHASE_W. The top LUT_AW bits of the phase address
// a full-period sine table whose entries are round(A * sin(2*pi*k/2^LUT_AW))
// with A = 2^(OUT_W-2), i.e. a signed output with OUT_W-2 fraction bits where
// +/-1.0 is +/-A. The table is computed at elaboration. `sine` is registered,
// so it shows the phase of the previous step (one step of latency).
// Phase width 16 and output width 6 are the reference design's DDS settings, and the
// accumulator feeding a sine lookup is the reference design's structure; the table
// size, number format and latency are this design's choice.
module dds #(
  parameter int unsigned PHASE_W = 16,
  parameter int unsigned OUT_W   = 6,
  parameter int unsigned LUT_AW  = 8
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      en,
  input  logic        [PHASE_W-1:0] delta,
  output logic signed [OUT_W-1:0]   sine
);
  localparam int unsigned LUT_N = 1 << LUT_AW;
  localparam real PI = 3.14159265358979323846;

  typedef logic signed [OUT_W-1:0] lut_t [LUT_N];

  function automatic lut_t make_lut();
    lut_t t;
    real  a;
    a = real'(1 << (OUT_W - 2));
    for (int k = 0; k < int'(LUT_N); k++)
      t[k] = OUT_W'($rtoi($floor(a * $sin(2.0 * PI * real'(k) / real'(LUT_N)) + 0.5)));
    return t;
  endfunction

  localparam lut_t LUT = make_lut();

  logic [PHASE_W-1:0] phase;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0;
      sine  <= '0;
    end else if (en) begin
      phase <= phase + delta;
      sine  <= LUT[phase[PHASE_W-1 -: LUT_AW]];
    end
  end
endmodule
