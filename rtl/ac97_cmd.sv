// ac97_cmd: codec register set-up state machine (AC97CMD).
//
// The state is an index over five register writes. On every `ready` pulse
// from the link controller (once per frame) the machine presents the write
// for the current index on cmd_addr/cmd_data, pulses `latching_cmd` for one
// cycle so the controller sends it in the next frame, and moves to the next
// index, wrapping after the last. The list repeats forever so that changes
// of `volume` and `source` reach the codec within five frames:
//   0x02 master volume     = attenuation on both channels, 31 - volume
//   0x04 headphone volume  = the same
//   0x18 PCM-out volume    = 0x0808 (0 dB, unmuted)
//   0x1A record select     = source on both channels
//   0x1C record gain       = 0x0000 (0 dB, unmuted)
// cmd_addr bit 7 is the read/write flag (0 = write). The existence of this
// state machine and its SOURCE/VOLUME inputs and command outputs are from the
// reference design; the register list and encodings come from the AC'97 register map
// and are this design's choice.
module ac97_cmd
  import fx_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ready,
  input  logic [4:0]  volume,
  input  logic [2:0]  source,
  output logic [7:0]  cmd_addr,
  output logic [15:0] cmd_data,
  output logic        latching_cmd
);
  typedef enum logic [2:0] {
    S_MASTER, S_HPHONE, S_PCM, S_RECSEL, S_RECGAIN
  } state_t;

  state_t    state;
  ac97_cmd_t next_cmd;
  logic [4:0] att;

  assign att = 5'd31 - volume;

  always_comb begin
    unique case (state)
      S_MASTER:  next_cmd = '{addr: {1'b0, REG_MASTER_VOL}, data: {3'b000, att, 3'b000, att}};
      S_HPHONE:  next_cmd = '{addr: {1'b0, REG_HPHONE_VOL}, data: {3'b000, att, 3'b000, att}};
      S_PCM:     next_cmd = '{addr: {1'b0, REG_PCM_OUT},    data: 16'h0808};
      S_RECSEL:  next_cmd = '{addr: {1'b0, REG_REC_SELECT}, data: {5'b0, source, 5'b0, source}};
      S_RECGAIN: next_cmd = '{addr: {1'b0, REG_REC_GAIN},   data: 16'h0000};
      default:   next_cmd = '{addr: 8'h00, data: 16'h0000};
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_MASTER;
      cmd_addr     <= '0;
      cmd_data     <= '0;
      latching_cmd <= 1'b0;
    end else begin
      latching_cmd <= 1'b0;
      if (ready) begin
        cmd_addr     <= next_cmd.addr;
        cmd_data     <= next_cmd.data;
        latching_cmd <= 1'b1;
        state        <= (state == S_RECGAIN) ? S_MASTER : state_t'(state + 3'd1);
      end
    end
  end
endmodule
