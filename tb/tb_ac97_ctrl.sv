// tb_ac97_ctrl: the AC'97 link controller against the behavioural codec.
// Checks: the codec reset stays low RESET_CYCLES cycles; every frame is 256
// bit clocks with SYNC high for 16 of them; `ready` comes once per frame,
// 256 bit clocks (20.83 us) apart; the left/right samples and the command
// (with its tag valid bits, or none) sent in each frame are the ones given
// before that frame; l_in / r_in and codec_ready match what the codec sent.
module tb_ac97_ctrl;
  import fx_pkg::*;
  localparam int RC = 20;
  logic clk = 0, rst = 1;
  logic bit_clk, sdata_in, sync, sdata_out, ac97_reset_n;
  logic [7:0] cmd_addr = 0;
  logic [15:0] cmd_data = 0;
  logic latching_cmd = 0;
  sample_t l_out = 0, r_out = 0, l_in, r_in;
  logic ready, codec_ready;
  logic [17:0] adc_l = 18'h12345, adc_r = 18'h2ABCD, adc_l_sent, adc_r_sent;
  logic [15:0] rx_tag;
  logic [19:0] rx_slot1, rx_slot2, rx_slot3, rx_slot4;
  int frames, sync_len, frame_len, writes;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ac97_ctrl #(.RESET_CYCLES(RC)) dut (
    .clk, .rst, .bit_clk, .sdata_in, .sync, .sdata_out, .ac97_reset_n,
    .cmd_addr, .cmd_data, .latching_cmd, .l_out, .r_out, .l_in, .r_in, .ready, .codec_ready
  );

  lm4550_model codec (
    .reset_n(ac97_reset_n), .sync, .sdata_out, .adc_l, .adc_r, .bit_clk, .sdata_in,
    .adc_l_sent, .adc_r_sent, .rx_tag, .rx_slot1, .rx_slot2, .rx_slot3, .rx_slot4,
    .frames, .sync_len, .frame_len, .writes
  );

  typedef struct { logic [17:0] l, r; bit cv; logic [7:0] a; logic [15:0] d; } frame_t;
  frame_t q[$];
  frame_t fchk, fnew;

  task automatic fail(string m);
    failures++;
    if (failures < 10) $display("FAIL: %s", m);
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reset length
  initial begin
    int low = 0;
    @(negedge rst);
    while (!ac97_reset_n) begin @(posedge clk); low++; end
    checks++;
    if (low < RC || low > RC + 2) fail($sformatf("codec reset low %0d cycles", low));
  end

  // frame checks at each frame the codec completes
  initial begin
    int seen = 0;
    forever begin
      @(frames);
      seen++;
      if (q.size() == 0) begin fail("frame with nothing queued"); continue; end
      begin
        fchk = q.pop_front();
        checks++;
        if (sync_len != 16 || frame_len != 256) fail($sformatf("sync %0d frame %0d", sync_len, frame_len));
        checks++;
        if (rx_tag[15] != 1 || rx_tag[12:11] != 2'b11 || rx_tag[14] != fchk.cv || rx_tag[13] != fchk.cv)
          fail($sformatf("tag %h", rx_tag));
        checks++;
        if (rx_slot3 != {fchk.l, 2'b00} || rx_slot4 != {fchk.r, 2'b00})
          fail($sformatf("pcm %h %h expected %h %h", rx_slot3, rx_slot4, fchk.l, fchk.r));
        if (fchk.cv) begin
          checks++;
          if (rx_slot1 != {fchk.a, 12'h0} || rx_slot2 != {fchk.d, 4'h0})
            fail($sformatf("cmd %h %h", rx_slot1, rx_slot2));
        end
      end
    end
  end

  initial begin
    realtime last_ready;
    repeat (3) @(posedge clk);
    rst <= 0;
    q.push_back('{l: 18'h0, r: 18'h0, cv: 0, a: 0, d: 0});
    last_ready = 0;
    for (int k = 0; k < 40; k++) begin
      @(posedge clk iff ready);
      #1;
      if (k > 0) begin
        checks++;
        if ($realtime - last_ready < 20800 || $realtime - last_ready > 20870)
          fail($sformatf("ready interval %0t", $realtime - last_ready));
      end
      last_ready = $realtime;
      checks++;
      if (l_in != sample_t'(adc_l_sent) || r_in != sample_t'(adc_r_sent) || !codec_ready)
        fail($sformatf("l_in %h r_in %h expected %h %h", l_in, r_in, adc_l_sent, adc_r_sent));
      // next frame's content
      fnew.l = 18'($urandom); fnew.r = 18'($urandom);
      fnew.cv = k % 2; fnew.a = {1'b0, 7'($urandom)}; fnew.d = 16'($urandom);
      l_out <= fnew.l; r_out <= fnew.r;
      if (fnew.cv) begin
        cmd_addr <= fnew.a; cmd_data <= fnew.d; latching_cmd <= 1;
        @(posedge clk);
        latching_cmd <= 0;
      end
      q.push_back(fnew);
      adc_l <= 18'($urandom); adc_r <= 18'($urandom);
    end
    @(frames);
    #1;
    checks++;
    if (frames < 38) fail("too few frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
