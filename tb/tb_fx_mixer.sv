// tb_fx_mixer: random and corner operands against y = clamp(x + floor(d*a/2^15)),
// computed with 64-bit integers; counts saturations in both directions.
module tb_fx_mixer;
  logic signed [17:0] x, d, y;
  logic [15:0] gain;
  logic sat;
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0;

  fx_mixer dut (.x, .d, .gain, .y, .sat);

  task automatic one(longint xv, longint dv, longint gv);
    longint p, q, s, e;
    bit es;
    x = 18'(xv); d = 18'(dv); gain = 16'(gv);
    #1;
    p = dv * gv;
    q = p >>> 15;
    s = xv + q;
    es = 0;
    e = s;
    if (s > 131071) begin e = 131071; es = 1; sat_hi++; end
    if (s < -131072) begin e = -131072; es = 1; sat_lo++; end
    checks++;
    if (longint'(y) != e || sat != es) begin
      failures++;
      $display("FAIL: x=%0d d=%0d a=%0d y=%0d expected %0d", xv, dv, gv, y, e);
    end
  endtask

  initial begin
    one(1000, 1000, 26214);      // echo gain 0.8
    one(-1000, 1000, 32768);     // unity gain
    one(131071, 131071, 32768);  // positive overflow
    one(-131072, -131072, 26214);// negative overflow
    one(5, -1, 26214);           // floor of a negative product
    for (int i = 0; i < 3000; i++)
      one(longint'($signed(18'($urandom))), longint'($signed(18'($urandom))),
          (i % 3 == 0) ? 26214 : (i % 3 == 1) ? 32768 : longint'($urandom % 65536));
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin failures++; $display("FAIL: saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
