// tb_fx_workloads: the two effect workloads on effect_sys at its default
// sizes (10000-word RAM, 16-bit DDS phase, sweep 0..100), with a sample on
// every clock so the run is short. Input is synthetic mono 16-bit audio
// (tone bursts plus noise) widened to 18 bits by two zero LSBs.
//  1. Echo: 25000 samples. Every output is compared with a reference model,
//     and a tone burst must come back 10001 samples later at 0.8 of its
//     amplitude (226.8 ms at 44.1 kHz).
//  2. Flanger: one full sweep cycle at delta_theta = 1 (65536 samples plus
//     margin). Every output is compared with the model; the sweep value must
//     cover 0 and 100 and peak every 32768 samples (a sine period of
//     65536 samples at delta_theta = 1); the effective delay, measured as
//     restart period + 1, must cover 3..103 samples.
module tb_fx_workloads;
  import fx_pkg::*;
  localparam int DEPTH = 10000;
  localparam real PI = 3.14159265358979323846;

  logic clk;
  logic rst = 1'b1, ce = 1'b0, sw = 1'b0;
  sample_t sound_in = '0, sound_out;
  logic clip;
  int checks = 0, failures = 0;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  effect_sys dut (
    .clk, .rst, .ce, .sound_in, .sw, .delta_plus(1'b0), .delta_minus(1'b0),
    .btn_en(1'b0), .sound_out, .clip
  );

  int mem [DEPTH];
  int ram_q, out_q, echo_c, fl_c, phase, sine_q, lim_q;
  int n_step;

  function automatic int ref_sine(int ph);
    return $rtoi($floor(16.0 * $sin(2.0 * PI * real'(ph >> 8) / 256.0) + 0.5));
  endfunction

  function automatic int audio(int n);
    real t, v;
    t = real'(n) / 44100.0;
    v = 0.0;
    if ((n % 8000) < 2000) v = 12000.0 * $sin(2.0 * PI * 440.0 * t);
    return $rtoi(v) + int'($urandom % 512) - 256;
  endfunction

  task automatic model_step(int x, bit s);
    int a, addr, sum;
    longint p;
    lim_q = $rtoi($floor(100.0 * real'(sine_q < 0 ? -sine_q : sine_q) / 16.0 + 0.5));
    a    = s ? 32768 : 26214;
    addr = s ? fl_c : echo_c;
    p    = longint'(ram_q) * a;
    sum  = x + int'(p >>> 15);
    if (sum > 131071)  sum = 131071;
    if (sum < -131072) sum = -131072;
    out_q = sum;
    ram_q = mem[addr];
    mem[addr] = x;
    echo_c = (echo_c + 1) % DEPTH;
    fl_c = (fl_c > lim_q) ? 0 : fl_c + 1;
    sine_q = ref_sine(phase);
    phase  = (phase + 1) % 65536;
  endtask

  task automatic step(int x, bit s);
    sound_in <= SAMPLE_W'(x);
    sw <= s;
    ce <= 1;
    @(posedge clk);
    model_step(x, s);
    #1;
    checks++;
    if (int'(sound_out) != out_q) begin
      failures++;
      if (failures < 10) $display("FAIL: sample %0d out %0d expected %0d", n_step, sound_out, out_q);
    end
    n_step++;
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ins [25000];
  int outs [25000];

  initial begin
    int pk_in, pk_echo, lmin, lmax, last_peak, peaks, bad_period, dmin, dmax, since, last_hit;
    for (int i = 0; i < DEPTH; i++) mem[i] = 0;
    ram_q = 0; out_q = 0; echo_c = 0; fl_c = 0; phase = 0; sine_q = 0; n_step = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);

    // 1. echo
    for (int n = 0; n < 25000; n++) begin
      ins[n] = audio(n) * 4;
      step(ins[n], 0);
      outs[n] = int'(sound_out);
    end
    // burst at samples 0..1999: output at n+10001 holds x[n+10001] + 0.8 x[n]
    pk_in = 0; pk_echo = 0;
    for (int n = 0; n < 2000; n++) begin
      int e;
      e = outs[n + 10001] - ins[n + 10001];
      if (ins[n] > pk_in) pk_in = ins[n];
      if (e > pk_echo) pk_echo = e;
    end
    checks++;
    if (pk_echo < (pk_in * 8) / 10 - 2 || pk_echo > (pk_in * 8) / 10 + 1) begin
      failures++;
      $display("FAIL: echo peak %0d for input peak %0d", pk_echo, pk_in);
    end
    // nothing may come back one sample early: x[-1] is the RAM's initial zero
    checks++;
    if (outs[10000] != ins[10000]) begin
      failures++;
      $display("FAIL: early echo at sample 10000");
    end
    $display("echo: input peak %0d, echo peak %0d after 10001 samples", pk_in, pk_echo);

    // 2. flanger, one full sweep cycle
    lmin = 999; lmax = -1; last_peak = -1; peaks = 0; bad_period = 0; dmin = 999; dmax = -1; since = 0; last_hit = -1;
    for (int n = 0; n < 65536 + 4000; n++) begin
      int prev_fl;
      prev_fl = fl_c;
      step(audio(n) * 4, 1);
      if (lim_q < lmin) lmin = lim_q;
      if (lim_q > lmax) lmax = lim_q;
      since++;
      if (fl_c == 0 && prev_fl != 0) begin
        // restart: the address period just ended is `since` samples; delay = period + 1
        if (n > 200) begin
          if (since + 1 < dmin) dmin = since + 1;
          if (since + 1 > dmax) dmax = since + 1;
        end
        since = 0;
      end
      // a crest keeps the limit at 100 for a few thousand samples; take the
      // first entry of each crest, ignoring re-entries within 5000 samples
      if (int'(dut.limit) == 100) begin
        if (last_hit < 0 || n - last_hit > 5000) begin
          if (last_peak >= 0) begin
            peaks++;
            if (n - last_peak < 32768 - 300 || n - last_peak > 32768 + 300) bad_period++;
          end
          last_peak = n;
        end
        last_hit = n;
      end
    end
    $display("flanger: limit %0d..%0d, delay %0d..%0d samples, crest intervals %0d (bad %0d)", lmin, lmax, dmin, dmax, peaks, bad_period);
    checks++;
    if (lmin != 0 || lmax != 100 || peaks < 1 || bad_period != 0 || dmin != 3 || dmax != 103) begin
      failures++;
      $display("FAIL: sweep range or rate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
