// tb_effect_sys: the combined echo / flanger system against a cycle-level
// reference model written from the equations:
//   y[n]   = clamp(x[n] + floor(a * ram_q / 2^15)),  a = 26214 (echo) or 32768
//   ram_q  = word read at the previous step (read before write)
//   echo address = n mod DEPTH; flanger address restarts after passing
//   L = round(100*|sine|/16), sine = round(16*sin(2*pi*(phase>>8)/256)),
//   phase += delta each step; delta steps with the buttons on btn_en.
// Part 1 (echo, DEPTH = 150): an impulse must come back, scaled by 0.8,
// exactly DEPTH+1 samples later. Part 2: random audio with mode switches,
// button steps of delta_theta and large samples that force clipping; every
// output sample is compared with the model. Each mechanism is counted and
// must occur: echo steps, flanger steps, mode switches, clips, flanger
// counter restarts at several different limits, delta changes.
module tb_effect_sys;
  import fx_pkg::*;
  localparam int DEPTH = 150;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst = 1, ce = 0, sw = 0, dplus = 0, dminus = 0, btn_en = 0;
  sample_t sound_in = '0, sound_out;
  logic clip;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  effect_sys #(.DEPTH(DEPTH)) dut (
    .clk, .rst, .ce, .sound_in, .sw, .delta_plus(dplus), .delta_minus(dminus),
    .btn_en, .sound_out, .clip
  );

  // reference model state
  int mem [DEPTH];
  int ram_q, out_q, echo_c, fl_c, phase, sine_q, delta_r;
  bit clip_q;
  int n_echo, n_flanger, n_switch, n_clip, n_fl_restart, n_delta;
  bit seen_limit [101];

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
    if (fl_c > lim) begin
      fl_c = 0;
      n_fl_restart++;
      seen_limit[lim] = 1;
    end else fl_c++;
    sine_q = ref_sine(phase);
    phase  = (phase + delta_r) & 16'hFFFF;
    if (s) n_flanger++; else n_echo++;
    if (clip_q) n_clip++;
  endtask

  // one sample step: drive inputs, pulse ce, advance the model, compare
  task automatic step(int x, bit s, bit btn_up, bit btn_down, bit bt);
    sound_in <= SAMPLE_W'(x);
    sw <= s; dplus <= btn_up; dminus <= btn_down; btn_en <= bt;
    ce <= 1;
    @(posedge clk);
    model_step(x, s);
    if (bt) begin
      if (btn_up && delta_r < 65535) begin delta_r++; n_delta++; end
      else if (btn_down && delta_r > 0) begin delta_r--; n_delta++; end
    end
    #1;
    checks++;
    if (int'(sound_out) != out_q || clip != clip_q) begin
      failures++;
      if (failures < 10) $display("FAIL: sw=%0d out %0d expected %0d", s, sound_out, out_q);
    end
    ce <= 0; btn_en <= 0;
    repeat (2) @(posedge clk);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first_echo, prev_sw;
    for (int i = 0; i < DEPTH; i++) mem[i] = 0;
    ram_q = 0; out_q = 0; echo_c = 0; fl_c = 0; phase = 0; sine_q = 0; delta_r = 1;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);

    // Part 1: echo impulse response
    first_echo = -1;
    for (int n = 0; n < 2 * DEPTH + 10; n++) begin
      step(n == 0 ? 10000 : 0, 0, 0, 0, 0);
      if (n > 0 && first_echo < 0 && sound_out != 0) first_echo = n;
    end
    checks++;
    if (first_echo != DEPTH + 1) begin
      failures++;
      $display("FAIL: echo came back after %0d samples, expected %0d", first_echo, DEPTH + 1);
    end

    // Part 2: raise delta_theta so the sweep moves, then random audio
    for (int k = 0; k < 700; k++) step(0, 1, 1, 0, 1);
    prev_sw = 1;
    for (int n = 0; n < 12000; n++) begin
      bit s;
      int x;
      s = ((n / 1500) % 2) == 0;
      if (s != prev_sw) n_switch++;
      prev_sw = s;
      x = ($urandom % 50 == 0) ? (($urandom % 2) ? 131071 : -131072)
                               : int'($signed(16'($urandom)));
      step(x, s, (n % 997) == 0, (n % 1301) == 0, (n % 50) == 0);
    end

    begin
      int nl = 0;
      for (int l = 0; l <= 100; l++) if (seen_limit[l]) nl++;
      $display("echo=%0d flanger=%0d switches=%0d clips=%0d restarts=%0d limits=%0d delta_changes=%0d",
               n_echo, n_flanger, n_switch, n_clip, n_fl_restart, nl, n_delta);
      checks++;
      if (n_echo == 0 || n_flanger == 0 || n_switch == 0 || n_clip == 0 || nl < 8 || n_delta == 0) begin
        failures++;
        $display("FAIL: a mechanism never happened");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
