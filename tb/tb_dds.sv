// tb_dds: the phase accumulator and sine table against a real-arithmetic
// model: after each enabled step the output must equal
// round(16 * sin(2*pi*(phase>>8)/256)) of the phase before the step.
// Also checks the output frequency F = delta * F_step / 2^16 by counting
// steps between rising zero crossings for delta = 512 (128 steps/period).
module tb_dds;
  logic clk = 0, rst = 1, en = 0;
  logic [15:0] delta = 0;
  logic signed [5:0] sine;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979323846;
  always #5 clk = ~clk;

  dds #(.PHASE_W(16), .OUT_W(6), .LUT_AW(8)) dut (.clk, .rst, .en, .delta, .sine);

  function automatic int ref_sine(int ph);
    return $rtoi($floor(16.0 * $sin(2.0 * PI * real'(ph >> 8) / 256.0) + 0.5));
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ph, last_cross, prev, step, periods, maxv, minv;
    repeat (2) @(posedge clk);
    rst <= 0;
    ph = 0;
    // random delta and enable
    for (int i = 0; i < 5000; i++) begin
      if (i % 500 == 0) delta <= 16'($urandom);
      en <= ($urandom % 3) != 0;
      @(posedge clk);
      if (en) begin
        int e;
        e = ref_sine(ph);
        ph = (ph + int'(delta)) & 16'hFFFF;
        #1;
        checks++;
        if (int'(sine) != e) begin
          failures++;
          $display("FAIL: step %0d sine %0d expected %0d", i, sine, e);
        end
      end
    end
    // frequency: delta = 512 -> 2^16/512 = 128 steps per period
    delta <= 16'd512;
    en <= 1;
    prev = 0; last_cross = -1; periods = 0; maxv = -99; minv = 99;
    for (step = 0; step < 128 * 6; step++) begin
      @(posedge clk); #1;
      if (int'(sine) > maxv) maxv = int'(sine);
      if (int'(sine) < minv) minv = int'(sine);
      if (prev < 0 && int'(sine) >= 0) begin
        if (last_cross >= 0) begin
          checks++;
          periods++;
          if (step - last_cross != 128) begin
            failures++;
            $display("FAIL: period %0d steps, expected 128", step - last_cross);
          end
        end
        last_cross = step;
      end
      prev = int'(sine);
    end
    checks++;
    if (periods < 4 || maxv != 16 || minv != -16) begin
      failures++;
      $display("FAIL: periods %0d max %0d min %0d", periods, maxv, minv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
