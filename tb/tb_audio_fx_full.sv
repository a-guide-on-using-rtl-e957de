// tb_audio_fx_full: the whole design at its default parameters: 100 MHz
// clock, 44.1 kHz sample enable (2268 cycles), 2 Hz buttons, 10000-sample
// echo RAM, against the behavioural codec. One complete operation: 10500
// samples of echo, so every RAM word is written and read back as an echo
// 10001 samples later, then the flanger with one 2 Hz step of delta_theta
// and of the volume. About 0.55 s of real time (55 M clock cycles).
// The same models and checks as tb_audio_fx_top: driver input against the
// codec's ADC word, every effect output against the reference model, every
// DAC frame against the loaded output, codec registers against volume and
// source. Counted mechanisms that must occur: echo steps, flanger steps, a
// mode switch, flanger counter restarts, a delta_theta step, a volume step,
// register writes, and echoes of non-zero input (output != input).
module tb_audio_fx_full;
  import fx_pkg::*;
  localparam int DEPTH = 10000;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, reset = 1;
  logic btn_vol_up = 0, btn_vol_down = 0, delta_plus = 0, delta_minus = 0, sw = 0;
  logic [2:0] source = 3'd1;
  logic bit_clk, sdata_in, sdata_out, sync, ac97_reset_n;
  logic [17:0] adc_l = 0, adc_r = 0, adc_l_sent, adc_r_sent;
  logic [15:0] rx_tag;
  logic [19:0] rx_slot1, rx_slot2, rx_slot3, rx_slot4;
  int frames, sync_len, frame_len, writes;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  audio_fx_top dut (
    .clk, .reset, .btn_vol_up, .btn_vol_down, .delta_plus, .delta_minus, .sw, .source,
    .bit_clk, .sdata_in, .sdata_out, .sync, .ac97_reset_n
  );

  lm4550_model codec (
    .reset_n(ac97_reset_n), .sync, .sdata_out, .adc_l, .adc_r, .bit_clk, .sdata_in,
    .adc_l_sent, .adc_r_sent, .rx_tag, .rx_slot1, .rx_slot2, .rx_slot3, .rx_slot4,
    .frames, .sync_len, .frame_len, .writes
  );

  task automatic fail(string m);
    failures++;
    if (failures < 12) $display("FAIL: %s", m);
  endtask

  // ---------------- effect reference model --------------------------------
  int mem [DEPTH];
  int ram_q, out_q, echo_c, fl_c, phase, sine_q, delta_r, vol_r;
  bit clip_q;
  int n_echo, n_flanger, n_switch, n_clip, n_restart, n_dup, n_ddown;
  int n_vup, n_vdown, n_vmax, n_vmin, n_echoed, last_x;

  function automatic int ref_sine(int ph);
    return $rtoi($floor(16.0 * $sin(2.0 * PI * real'(ph >> 8) / 256.0) + 0.5));
  endfunction

  task automatic model_step(int x, bit s);
    int lim, a, addr, sum;
    longint p;
    lim  = $rtoi($floor(100.0 * real'(sine_q < 0 ? -sine_q : sine_q) / 16.0 + 0.5));
    a    = s ? 32768 : 26214;
    addr = s ? fl_c : echo_c;
    p    = longint'(ram_q) * a;
    sum  = x + int'(p >>> 15);
    clip_q = 0;
    if (sum > 131071)  begin sum = 131071;  clip_q = 1; end
    if (sum < -131072) begin sum = -131072; clip_q = 1; end
    out_q = sum;
    ram_q = mem[addr];
    mem[addr] = x;
    echo_c = (echo_c + 1) % DEPTH;
    if (fl_c > lim) begin fl_c = 0; if (s) n_restart++; end
    else fl_c++;
    sine_q = ref_sine(phase);
    phase  = (phase + delta_r) & 16'hFFFF;
    if (s) n_flanger++; else n_echo++;
    if (clip_q) n_clip++;
  endtask

  // Inputs are read at the falling edge, where everything is stable; the
  // design acts on them at the next rising edge.
  initial begin
    bit pend, last_sw;
    for (int i = 0; i < DEPTH; i++) mem[i] = 0;
    ram_q = 0; out_q = 0; echo_c = 0; fl_c = 0; phase = 0; sine_q = 0; delta_r = 1; vol_r = 0;
    pend = 0; last_sw = 0;
    @(negedge reset);
    forever begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (int'(dut.sound_out) != out_q) fail($sformatf("effect out %0d expected %0d", dut.sound_out, out_q));
        pend = 0;
      end
      if (dut.ce44k) begin
        if (!dut.sw_s && n_echo > DEPTH + 1 && dut.sound_out != 0 && int'(dut.sound_out) != last_x) n_echoed++;
        last_x = int'(dut.l_in);
        if (dut.sw_s != last_sw) n_switch++;
        last_sw = dut.sw_s;
        model_step(int'(dut.l_in), dut.sw_s);
        pend = 1;
      end
      if (dut.ce2hz) begin
        if (dut.d_plus && delta_r < 65535) begin delta_r++; n_dup++; end
        else if (dut.d_minus && delta_r > 0) begin delta_r--; n_ddown++; end
        if (dut.vol_up && vol_r < 31) begin vol_r++; n_vup++; end
        else if (dut.vol_down && vol_r > 0) begin vol_r--; n_vdown++; end
        if (vol_r == 31 && dut.vol_up) n_vmax++;
        if (vol_r == 0 && dut.vol_down) n_vmin++;
      end
    end
  end

  // ---------------- link checks -------------------------------------------
  sample_t loaded [$];
  always @(negedge clk) begin
    if (dut.u_lm4550.u_ctrl.load) loaded.push_back(dut.sound_out);
    if (dut.frame_ready) begin
      checks++;
      if (dut.l_in != sample_t'(adc_l_sent)) fail($sformatf("l_in %h expected %h", dut.l_in, adc_l_sent));
    end
  end

  initial begin
    forever begin
      @(frames);
      #1;
      if (loaded.size() > 0) begin
        sample_t v;
        v = loaded.pop_front();
        checks++;
        if (rx_slot3 != {v, 2'b00} || rx_slot4 != {v, 2'b00})
          fail($sformatf("DAC %h %h expected %h", rx_slot3, rx_slot4, v));
      end
      adc_l <= ($urandom % 8 == 0) ? 18'h1FFFF : 18'($urandom);
      adc_r <= 18'($urandom);
    end
  end

  task automatic check_regs();
    logic [4:0] att;
    att = 5'd31 - 5'(vol_r);
    checks++;
    if (codec.regs[7'h02] != {3'b0, att, 3'b0, att} || codec.regs[7'h1A] != {5'b0, source, 5'b0, source})
      fail($sformatf("codec regs %h %h, volume %0d source %0d", codec.regs[7'h02], codec.regs[7'h1A], vol_r, source));
  endtask

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    reset <= 0;
    sw <= 0; btn_vol_up <= 1; delta_plus <= 1; source <= 3'd2;
    // echo: 10500 samples of 2268 cycles
    repeat (10500 * 2268) @(posedge clk);
    // flanger, across the first 2 Hz button step at 50 M cycles
    sw <= 1;
    repeat (52_000_000 - 10500 * 2268) @(posedge clk);
    btn_vol_up <= 0; delta_plus <= 0;
    repeat (12) @(frames);
    check_regs();
    $display("echo=%0d flanger=%0d switches=%0d echoed=%0d restarts=%0d delta_up=%0d vol_up=%0d writes=%0d",
             n_echo, n_flanger, n_switch, n_echoed, n_restart, n_dup, n_vup, writes);
    checks++;
    if (n_echo < DEPTH + 100 || n_flanger == 0 || n_switch == 0 || n_echoed == 0 || n_restart == 0 ||
        n_dup == 0 || n_vup == 0 || writes == 0)
      fail("a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
