// effect_sys: echo and flanger effects sharing one delay-line RAM (SYS_CP).
//
// Every sample step (`ce`, 44.1 kHz) the input sample is written into the RAM
// at the current address while the old word there is read out. Two address
// generators run side by side: the echo counter wraps every DEPTH steps
// (fixed delay), and the flanger counter wraps when it passes a limit that
// follows |sin| of a slow DDS scaled to 0..SWEEP_MAX (swept delay). The
// switch `sw` picks which counter addresses the RAM (0 echo, 1 flanger) and
// with it the mix gain (0.8 echo, 1.0 flanger). The output is
//   sound_out = sat(sound_in + a * ram_out),
// registered on `ce`. The RAM output counts as zero on the first step after
// reset, as the RAM has no output reset. `clip` (this design's addition)
// flags a saturated sum. Because the RAM reads the word written in the
// previous pass one step late, in echo mode sound_out after step n is
//   x[n] + 0.8 * x[n-1-DEPTH].
// The DDS tuning word delta_theta is held in a button-stepped register
// (delta_plus / delta_minus, stepped on `btn_en`). The structure, sizes and
// gains follow the reference design; the switch polarity, gain format, saturation
// and the delta_theta reset value are this design's choices.
module effect_sys
  import fx_pkg::*;
#(
  parameter int unsigned DEPTH        = 10000,
  parameter int unsigned PHASE_W      = 16,
  parameter int unsigned DDS_OUT_W    = 6,
  parameter int unsigned SWEEP_MAX    = 100,
  parameter logic [GAIN_W-1:0] ECHO_GAIN    = 16'd26214,
  parameter logic [GAIN_W-1:0] FLANGER_GAIN = 16'd32768,
  parameter logic [PHASE_W-1:0] DELTA_INIT  = 1
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    ce,
  input  sample_t sound_in,
  input  logic    sw,
  input  logic    delta_plus,
  input  logic    delta_minus,
  input  logic    btn_en,
  output sample_t sound_out,
  output logic    clip
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned LW = $clog2(SWEEP_MAX + 1);

  logic [AW-1:0]             echo_addr, flanger_addr, ram_addr;
  logic [PHASE_W-1:0]        delta_theta;
  logic signed [DDS_OUT_W-1:0] sine;
  logic [LW-1:0]             limit;
  sample_t                   ram_out, ram_word, mixed;
  logic                      primed;
  gain_t                     gain;
  logic                      sat;

  mod_counter #(.MOD(DEPTH)) u_echo_cnt (
    .clk, .rst, .en(ce), .count(echo_addr)
  );

  btn_updown #(.W(PHASE_W), .INIT(DELTA_INIT)) u_delta (
    .clk, .rst, .en(btn_en), .up(delta_plus), .down(delta_minus),
    .value(delta_theta), .at_max(), .at_min()
  );

  dds #(.PHASE_W(PHASE_W), .OUT_W(DDS_OUT_W)) u_dds (
    .clk, .rst, .en(ce), .delta(delta_theta), .sine
  );

  abs_scale #(.IN_W(DDS_OUT_W), .SCALE(SWEEP_MAX)) u_abs (
    .sine, .limit
  );

  flanger_counter #(.W(AW), .LW(LW)) u_fl_cnt (
    .clk, .rst, .en(ce), .limit, .count(flanger_addr)
  );

  // Address multiplexer controlled by the switch, as in the assembled design.
  assign ram_addr = sw ? flanger_addr : echo_addr;
  assign gain     = sw ? FLANGER_GAIN : ECHO_GAIN;

  sp_ram #(.DEPTH(DEPTH), .W(SAMPLE_W)) u_ram (
    .clk, .en(ce), .we(1'b1), .addr(ram_addr), .din(sound_in), .dout(ram_out)
  );

  // The RAM's output register has no reset; until the first read after
  // reset has happened its value is not a stored sample, so use zero.
  always_ff @(posedge clk) begin
    if (rst)
      primed <= 1'b0;
    else if (ce)
      primed <= 1'b1;
  end
  assign ram_word = primed ? ram_out : '0;

  fx_mixer u_mix (
    .x(sound_in), .d(ram_word), .gain, .y(mixed), .sat
  );

  always_ff @(posedge clk) begin
    if (rst)
      sound_out <= '0;
    else if (ce)
      sound_out <= mixed;
  end

  always_ff @(posedge clk) begin
    if (rst)
      clip <= 1'b0;
    else if (ce)
      clip <= sat;
  end

  // The flanger wrap point must stay inside the shared RAM.
  if (SWEEP_MAX + 2 > DEPTH) begin : g_bad_depth
    $error("effect_sys: SWEEP_MAX + 2 must not exceed DEPTH");
  end
endmodule
