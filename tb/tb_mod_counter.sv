// tb_mod_counter: the echo address counter must step only when enabled and
// wrap from MOD-1 to 0; checked against an integer model for MOD = 13.
module tb_mod_counter;
  localparam int MOD = 13;
  logic clk = 0, rst = 1, en = 0;
  logic [3:0] count;
  int checks = 0, failures = 0, wraps = 0, ref_c;
  always #5 clk = ~clk;

  mod_counter #(.MOD(MOD)) dut (.clk, .rst, .en, .count);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    ref_c = 0;
    for (int i = 0; i < 500; i++) begin
      en <= ($urandom % 4) != 0;
      @(posedge clk);
      if (en) begin
        if (ref_c == MOD - 1) begin ref_c = 0; wraps++; end
        else ref_c++;
      end
      #1;
      checks++;
      if (int'(count) != ref_c) begin
        failures++;
        $display("FAIL: count %0d expected %0d", count, ref_c);
      end
    end
    checks++;
    if (wraps < 5) begin failures++; $display("FAIL: too few wraps"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
