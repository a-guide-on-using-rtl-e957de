// tb_lm4550_driver: the complete codec driver in talk-through (ADC samples
// wired straight back to the DAC, the board bring-up test) against the
// behavioural codec. Checks that every DAC slot carries the ADC sample of
// the frame before, and that after volume/source changes the codec's
// registers hold master/headphone attenuation 31 - volume, PCM-out 0x0808,
// record select = source on both channels and record gain 0.
module tb_lm4550_driver;
  import fx_pkg::*;
  logic clk = 0, rst = 1;
  logic bit_clk, sdata_in, sync, sdata_out, ac97_reset_n;
  logic [2:0] source = 3'd4;
  logic [4:0] volume = 5'd31;
  sample_t l_in, r_in;
  logic ready, codec_ready;
  logic [17:0] adc_l = 0, adc_r = 0, adc_l_sent, adc_r_sent;
  logic [15:0] rx_tag;
  logic [19:0] rx_slot1, rx_slot2, rx_slot3, rx_slot4;
  int frames, sync_len, frame_len, writes;
  int checks = 0, failures = 0;
  logic [17:0] sent_l [0:255], sent_r [0:255];
  always #5 clk = ~clk;

  lm4550_driver #(.RESET_CYCLES(20)) dut (
    .clk, .rst, .bit_clk, .sdata_in, .sync, .sdata_out, .ac97_reset_n,
    .source, .volume, .l_out(l_in), .r_out(r_in), .l_in, .r_in, .ready, .codec_ready
  );

  lm4550_model codec (
    .reset_n(ac97_reset_n), .sync, .sdata_out, .adc_l, .adc_r, .bit_clk, .sdata_in,
    .adc_l_sent, .adc_r_sent, .rx_tag, .rx_slot1, .rx_slot2, .rx_slot3, .rx_slot4,
    .frames, .sync_len, .frame_len, .writes
  );

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // talk-through data check
  initial begin
    forever begin
      @(frames);
      #1;
      if (frames < 250) begin
        sent_l[frames + 1] = adc_l_sent;
        sent_r[frames + 1] = adc_r_sent;
        if (frames >= 3) begin
          checks++;
          if (rx_slot3 != {sent_l[frames - 1], 2'b00} || rx_slot4 != {sent_r[frames - 1], 2'b00}) begin
            failures++;
            $display("FAIL: frame %0d DAC %h %h expected %h %h", frames, rx_slot3, rx_slot4,
                     sent_l[frames - 1], sent_r[frames - 1]);
          end
        end
      end
      adc_l <= 18'($urandom);
      adc_r <= 18'($urandom);
    end
  end

  task automatic check_regs();
    logic [4:0] att;
    att = 5'd31 - volume;
    checks++;
    if (codec.regs[7'h02] != {3'b0, att, 3'b0, att} || codec.regs[7'h04] != {3'b0, att, 3'b0, att} ||
        codec.regs[7'h18] != 16'h0808 || codec.regs[7'h1A] != {5'b0, source, 5'b0, source} ||
        codec.regs[7'h1C] != 16'h0000) begin
      failures++;
      $display("FAIL: registers %h %h %h %h %h (volume %0d source %0d)", codec.regs[7'h02],
               codec.regs[7'h04], codec.regs[7'h18], codec.regs[7'h1A], codec.regs[7'h1C], volume, source);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (12) @(frames);
    check_regs();
    volume <= 5'd10; source <= 3'd0;
    repeat (12) @(frames);
    check_regs();
    volume <= 5'd0; source <= 3'd7;
    repeat (12) @(frames);
    check_regs();
    checks++;
    if (!codec_ready) begin failures++; $display("FAIL: codec_ready low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
