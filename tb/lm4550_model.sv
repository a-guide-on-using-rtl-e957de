// lm4550_model: behavioural model of the LM4550 codec's AC-link side.
// Not synthesizable; used only by testbenches.
//
// After reset_n goes high the model starts a 12.288 MHz BIT_CLK (half period
// 40.69 ns; delays are in ns). On each rising edge it samples SYNC and
// SDATA_OUT; a rising SYNC marks bit 0 of a new 256-bit frame. When a frame
// has been received it publishes the tag and slots 1..4, the number of bit
// clocks SYNC was high and the frame length, and applies a register write
// (tag slots 1 and 2 valid, read/write bit 0) to its register file `regs`.
// From the same edge it drives SDATA_IN with its own frame: tag with
// codec-ready and slot 3/4 valid, then adc_l / adc_r (latched at frame start)
// in slots 3 and 4, the top 18 of 20 bits.
module lm4550_model #(
  parameter real HALF_PERIOD_NS = 40.69
) (
  input  logic        reset_n,
  input  logic        sync,
  input  logic        sdata_out,
  input  logic [17:0] adc_l,
  input  logic [17:0] adc_r,
  output logic        bit_clk,
  output logic        sdata_in,
  output logic [17:0] adc_l_sent,
  output logic [17:0] adc_r_sent,
  output logic [15:0] rx_tag,
  output logic [19:0] rx_slot1,
  output logic [19:0] rx_slot2,
  output logic [19:0] rx_slot3,
  output logic [19:0] rx_slot4,
  output int          frames,
  output int          sync_len,
  output int          frame_len,
  output int          writes
);
  logic [15:0] regs [128];
  logic [255:0] rx_bits, tx_bits;
  int   idx, sync_cnt, len_cnt;
  logic sync_q;

  initial begin
    bit_clk = 0; sdata_in = 0; frames = 0; writes = 0; sync_len = 0; frame_len = 0;
    idx = 300; sync_q = 0; sync_cnt = 0; len_cnt = 0; rx_bits = '0; tx_bits = '0;
    adc_l_sent = '0; adc_r_sent = '0;
    rx_tag = '0; rx_slot1 = '0; rx_slot2 = '0; rx_slot3 = '0; rx_slot4 = '0;
    for (int i = 0; i < 128; i++) regs[i] = 16'hFFFF;
    wait (reset_n === 1'b1);
    #200;
    forever begin
      #HALF_PERIOD_NS bit_clk = 1;
      #HALF_PERIOD_NS bit_clk = 0;
    end
  end

  always @(posedge bit_clk) begin
    if (sync && !sync_q) begin
      if (idx == 256) begin
        // previous frame complete
        rx_tag   <= rx_bits[255:240];
        rx_slot1 <= rx_bits[239:220];
        rx_slot2 <= rx_bits[219:200];
        rx_slot3 <= rx_bits[199:180];
        rx_slot4 <= rx_bits[179:160];
        if (rx_bits[255] && rx_bits[254] && rx_bits[253] && !rx_bits[239]) begin
          regs[rx_bits[238:232]] <= rx_bits[219:204];
          writes <= writes + 1;
        end
        frames    <= frames + 1;
        sync_len  <= sync_cnt;
        frame_len <= len_cnt;
      end
      idx      = 0;
      sync_cnt = 0;
      len_cnt  = 0;
      adc_l_sent <= adc_l;
      adc_r_sent <= adc_r;
      tx_bits = {16'b1001_1000_0000_0000, 20'h0, 20'h0, adc_l, 2'b00, adc_r, 2'b00, 160'h0};
    end
    sync_q <= sync;
    if (sync) sync_cnt++;
    len_cnt++;
    if (idx < 256) begin
      rx_bits[255 - idx] = sdata_out;
      sdata_in <= tx_bits[255 - idx];
      idx++;
    end else begin
      sdata_in <= 1'b0;
    end
  end
endmodule
