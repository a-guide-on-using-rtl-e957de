// lm4550_driver: LM4550 AC'97 codec driver (LM4550_CP).
//
// Pairs the AC'97 link controller with the register set-up state machine,
// as in the reference design's driver: the state machine turns the 3-bit record
// SOURCE and the 5-bit VOLUME into codec register writes, handing one
// command per frame to the controller over cmd_addr (8 bits), cmd_data
// (16 bits) and latching_cmd, and the controller's once-per-frame `ready`
// paces it. Towards the design the driver exchanges 18-bit left/right
// samples, updated once per 48 kHz frame. See ac97_ctrl and ac97_cmd for
// the frame format and timing.
module lm4550_driver
  import fx_pkg::*;
#(
  parameter int unsigned RESET_CYCLES = 200
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       bit_clk,
  input  logic       sdata_in,
  output logic       sync,
  output logic       sdata_out,
  output logic       ac97_reset_n,
  input  logic [2:0] source,
  input  logic [4:0] volume,
  input  sample_t    l_out,
  input  sample_t    r_out,
  output sample_t    l_in,
  output sample_t    r_in,
  output logic       ready,
  output logic       codec_ready
);
  logic [7:0]  cmd_addr;
  logic [15:0] cmd_data;
  logic        latching_cmd;

  ac97_cmd u_cmd (
    .clk, .rst, .ready, .volume, .source, .cmd_addr, .cmd_data, .latching_cmd
  );

  ac97_ctrl #(.RESET_CYCLES(RESET_CYCLES)) u_ctrl (
    .clk, .rst, .bit_clk, .sdata_in, .sync, .sdata_out, .ac97_reset_n,
    .cmd_addr, .cmd_data, .latching_cmd,
    .l_out, .r_out, .l_in, .r_in, .ready, .codec_ready
  );
endmodule
