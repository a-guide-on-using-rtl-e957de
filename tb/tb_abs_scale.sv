// tb_abs_scale: exhaustive check of round(|s| / 16 * 100) for every 6-bit
// input, computed with real arithmetic (ties round up), plus the end points
// 0 and 100 and the sign symmetry.
module tb_abs_scale;
  logic signed [5:0] sine;
  logic [6:0] limit;
  int checks = 0, failures = 0;

  abs_scale #(.IN_W(6), .SCALE(100)) dut (.sine, .limit);

  initial begin
    for (int s = -32; s < 32; s++) begin
      int expv;
      real r;
      sine = 6'(s);
      #1;
      r = (s < 0 ? -s : s) * 100.0 / 16.0;
      expv = $rtoi($floor(r + 0.5));
      if (expv > 127) expv = expv % 128;
      checks++;
      if (int'(limit) != expv) begin
        failures++;
        $display("FAIL: sine %0d limit %0d expected %0d", s, limit, expv);
      end
    end
    sine = 6'sd16;  #1; checks++; if (limit != 7'd100) begin failures++; $display("FAIL: +1.0 -> %0d", limit); end
    sine = -6'sd16; #1; checks++; if (limit != 7'd100) begin failures++; $display("FAIL: -1.0 -> %0d", limit); end
    sine = 6'sd0;   #1; checks++; if (limit != 7'd0)   begin failures++; $display("FAIL: 0 -> %0d", limit); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
