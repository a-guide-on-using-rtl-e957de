// ac97_ctrl: AC'97 link controller for the LM4550 codec.
//
// The codec supplies the 12.288 MHz BIT_CLK; this block samples it (and
// SDATA_IN) with the system clock through two-flip-flop synchronisers and acts
// on the detected edges, so all its logic is in the system clock domain.
// A frame is 256 bit clocks (48 kHz). Just after each BIT_CLK rising edge the
// block drives the next frame bit: SYNC is high for bits 0..15 (16/256 duty)
// and SDATA_OUT carries, MSB first,
//   tag (16):   valid-frame, slot1/slot2 valid (a command is pending),
//               slot3/slot4 valid, 11 zeros
//   slot 1 (20): cmd_addr (read/write bit + register index), 12 zeros
//   slot 2 (20): cmd_data, 4 zeros
//   slot 3 (20): l_out, 2 zeros        slot 4 (20): r_out, 2 zeros
// and zeros for slots 5..12. The codec answers one bit clock later: input
// bit k is sampled on the falling edge after the rising edge on which output
// bit k+1 went out. After the last bit of slot 4 the block updates l_in/r_in
// from the codec's PCM slots (when the tag marks them valid), copies the
// tag's codec-ready bit to `codec_ready`, and pulses `ready` for one cycle,
// once per frame (every 20.8 us). `latching_cmd` stores cmd_addr/cmd_data
// for the next frame. After reset the codec's reset line is held low for
// RESET_CYCLES system clocks.
// The pin set, the 48 kHz 16/256 SYNC, the SYNC timing against the rising
// edge and the 18-bit samples follow the reference design; the slot layout is the
// AC'97 standard; the synchroniser scheme and reset length are this design's.
module ac97_ctrl
  import fx_pkg::*;
#(
  parameter int unsigned RESET_CYCLES = 200
) (
  input  logic        clk,
  input  logic        rst,
  // AC link
  input  logic        bit_clk,
  input  logic        sdata_in,
  output logic        sync,
  output logic        sdata_out,
  output logic        ac97_reset_n,
  // command port
  input  logic [7:0]  cmd_addr,
  input  logic [15:0] cmd_data,
  input  logic        latching_cmd,
  // samples
  input  sample_t     l_out,
  input  sample_t     r_out,
  output sample_t     l_in,
  output sample_t     r_in,
  output logic        ready,
  output logic        codec_ready
);
  localparam int unsigned PAY_BITS = AC97_TAG_BITS + 4 * AC97_SLOT_BITS;  // 96
  localparam int unsigned RCW = (RESET_CYCLES > 1) ? $clog2(RESET_CYCLES + 1) : 1;
  localparam int unsigned PADW = AC97_SLOT_BITS - SAMPLE_W;

  // ---- codec reset -------------------------------------------------------
  logic [RCW-1:0] rst_cnt;
  always_ff @(posedge clk) begin
    if (rst) begin
      rst_cnt      <= '0;
      ac97_reset_n <= 1'b0;
    end else if (rst_cnt != RCW'(RESET_CYCLES)) begin
      rst_cnt      <= rst_cnt + 1'b1;
      ac97_reset_n <= 1'b0;
    end else begin
      ac97_reset_n <= 1'b1;
    end
  end

  // ---- synchronisers and edge detection -----------------------------------
  logic [2:0] bc_s;
  logic [1:0] sdi_s;
  logic       bc_rise, bc_fall;
  always_ff @(posedge clk) begin
    bc_s  <= {bc_s[1:0], bit_clk};
    sdi_s <= {sdi_s[0], sdata_in};
  end
  assign bc_rise = bc_s[1] & ~bc_s[2];
  assign bc_fall = ~bc_s[1] & bc_s[2];

  // ---- command latch -----------------------------------------------------
  ac97_cmd_t cmd_q;
  logic      cmd_pend;

  // ---- transmit ----------------------------------------------------------
  ac97_bitpos_t          bcnt;
  logic [PAY_BITS-1:0]   tx_sh;
  logic [PAY_BITS-1:0]   tx_frame;
  logic [15:0]           tx_tag;
  logic                  load;

  assign load   = bc_rise && (bcnt == '0) && ac97_reset_n;
  assign tx_tag = {1'b1, cmd_pend, cmd_pend, 1'b1, 1'b1, 11'b0};
  assign tx_frame = {tx_tag,
                     cmd_pend ? cmd_q.addr : 8'h00, 12'h000,
                     cmd_pend ? cmd_q.data : 16'h0000, 4'h0,
                     l_out, PADW'(0),
                     r_out, PADW'(0)};

  always_ff @(posedge clk) begin
    if (rst || !ac97_reset_n) begin
      bcnt      <= '0;
      tx_sh     <= '0;
      sync      <= 1'b0;
      sdata_out <= 1'b0;
      cmd_pend  <= 1'b0;
      cmd_q     <= '0;
    end else begin
      if (bc_rise) begin
        bcnt <= bcnt + 1'b1;
        sync <= (bcnt < ac97_bitpos_t'(AC97_TAG_BITS));
        if (load) begin
          sdata_out <= tx_frame[PAY_BITS-1];
          tx_sh     <= {tx_frame[PAY_BITS-2:0], 1'b0};
        end else begin
          sdata_out <= tx_sh[PAY_BITS-1];
          tx_sh     <= {tx_sh[PAY_BITS-2:0], 1'b0};
        end
      end
      if (latching_cmd) begin
        cmd_q    <= '{addr: cmd_addr, data: cmd_data};
        cmd_pend <= 1'b1;
      end else if (load) begin
        cmd_pend <= 1'b0;
      end
    end
  end

  // ---- receive -----------------------------------------------------------
  ac97_bitpos_t        in_idx;
  logic [PAY_BITS-2:0] rx_sh;
  logic [PAY_BITS-1:0] rx_word;
  assign in_idx  = bcnt - ac97_bitpos_t'(2);
  assign rx_word = {rx_sh, sdi_s[1]};

  always_ff @(posedge clk) begin
    if (rst || !ac97_reset_n) begin
      rx_sh       <= '0;
      l_in        <= '0;
      r_in        <= '0;
      ready       <= 1'b0;
      codec_ready <= 1'b0;
    end else begin
      ready <= 1'b0;
      if (bc_fall && (in_idx < ac97_bitpos_t'(PAY_BITS))) begin
        rx_sh <= rx_word[PAY_BITS-2:0];
        if (in_idx == ac97_bitpos_t'(PAY_BITS - 1)) begin
          ready       <= 1'b1;
          codec_ready <= rx_word[PAY_BITS-1];
          if (rx_word[PAY_BITS-4]) l_in <= rx_word[2*AC97_SLOT_BITS-1 -: SAMPLE_W];
          if (rx_word[PAY_BITS-5]) r_in <= rx_word[AC97_SLOT_BITS-1 -: SAMPLE_W];
        end
      end
    end
  end

  // SYNC must be high exactly for the tag slot of the frame being sent.
  property p_sync_tag;
    @(posedge clk) disable iff (rst || !ac97_reset_n)
      $rose(sync) |-> (bcnt == ac97_bitpos_t'(1));
  endproperty
  assert property (p_sync_tag);
endmodule
