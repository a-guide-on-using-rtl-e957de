// audio_fx_top: real-time echo / flanger processor for an AC'97 codec board.
//
// Audio enters through the LM4550 codec, whose AC-link driver delivers 18-bit
// samples; the effects system adds either an echo (fixed 10000-sample delay,
// gain 0.8) or a flanger (delay swept 3..103 samples by a slow sine, gain 1)
// and the result goes back out through the same driver to both DAC
// channels. A switch selects the effect. Four buttons step the codec volume
// (5 bits) and the flanger's DDS tuning word twice per second while held;
// three switches pick the codec's record source.
// Everything runs on the 100 MHz board clock. Dividers make a 44.1 kHz
// sample enable (2268 cycles) and a 2 Hz button-repeat enable; the effects
// sample the last left ADC word on every 44.1 kHz enable, while the codec
// link itself runs 48 kHz frames. Buttons are synchronised with two
// flip-flops. `reset` is the active-high reset button.
// The component split, clock rates and button scheme follow the reference design;
// using enables instead of derived clocks, the left-channel input and the
// synchronisers are this design's choices.
module audio_fx_top
  import fx_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 100_000_000,
  parameter int unsigned FS_HZ        = 44_100,
  parameter int unsigned BTN_HZ       = 2,
  parameter int unsigned ECHO_DEPTH   = 10000,
  parameter int unsigned RESET_CYCLES = 200
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       btn_vol_up,
  input  logic       btn_vol_down,
  input  logic       delta_plus,
  input  logic       delta_minus,
  input  logic       sw,
  input  logic [2:0] source,
  input  logic       bit_clk,
  input  logic       sdata_in,
  output logic       sdata_out,
  output logic       sync,
  output logic       ac97_reset_n
);
  localparam int unsigned FS_DIV  = (CLK_HZ + FS_HZ / 2) / FS_HZ;
  localparam int unsigned BTN_DIV = CLK_HZ / BTN_HZ;

  // ---- reset and input synchronisers --------------------------------------
  // Power-up value 1 holds the design in reset until the button has been
  // sampled, so nothing (in particular no RAM write) happens before reset.
  logic [1:0] rst_s = 2'b11;
  logic       rst;
  always_ff @(posedge clk) rst_s <= {rst_s[0], reset};
  assign rst = rst_s[1];

  logic [5:0] btn_s0, btn_s1;
  always_ff @(posedge clk) begin
    btn_s0 <= {btn_vol_up, btn_vol_down, delta_plus, delta_minus, sw, 1'b0};
    btn_s1 <= btn_s0;
  end
  logic vol_up, vol_down, d_plus, d_minus, sw_s;
  assign {vol_up, vol_down, d_plus, d_minus, sw_s} = btn_s1[5:1];

  // ---- clock enables ------------------------------------------------------
  logic ce44k, ce2hz;
  tick_div #(.DIV(FS_DIV))  u_fs_div  (.clk, .rst, .tick(ce44k));
  tick_div #(.DIV(BTN_DIV)) u_btn_div (.clk, .rst, .tick(ce2hz));

  // ---- volume control -----------------------------------------------------
  logic [4:0] volume;
  btn_updown #(.W(5), .INIT(5'd0)) u_vol (
    .clk, .rst, .en(ce2hz), .up(vol_up), .down(vol_down),
    .value(volume), .at_max(), .at_min()
  );

  // ---- codec driver -------------------------------------------------------
  sample_t l_in, r_in, sound_out;
  logic    frame_ready, codec_ready;

  lm4550_driver #(.RESET_CYCLES(RESET_CYCLES)) u_lm4550 (
    .clk, .rst, .bit_clk, .sdata_in, .sync, .sdata_out, .ac97_reset_n,
    .source, .volume,
    .l_out(sound_out), .r_out(sound_out), .l_in, .r_in,
    .ready(frame_ready), .codec_ready
  );

  // ---- effects ------------------------------------------------------------
  logic clip;
  effect_sys #(.DEPTH(ECHO_DEPTH)) u_fx (
    .clk, .rst, .ce(ce44k), .sound_in(l_in), .sw(sw_s),
    .delta_plus(d_plus), .delta_minus(d_minus), .btn_en(ce2hz),
    .sound_out, .clip
  );
endmodule
