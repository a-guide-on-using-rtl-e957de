// tb_btn_updown: random button presses against a reference model of the
// saturating up/down register (up has priority, steps only when en is high,
// no step past all-ones or zero), for a 3-bit register so both limits are hit.
module tb_btn_updown;
  localparam int W = 3;
  logic clk = 0, rst = 1, en = 0, up = 0, down = 0;
  logic [W-1:0] value;
  logic at_max, at_min;
  int checks = 0, failures = 0, hit_max = 0, hit_min = 0;
  int ref_v;
  always #5 clk = ~clk;

  btn_updown #(.W(W), .INIT(3'd2)) dut (.clk, .rst, .en, .up, .down, .value, .at_max, .at_min);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    ref_v = 2;
    for (int i = 0; i < 2000; i++) begin
      en   <= ($urandom % 3) != 0;
      up   <= ($urandom % 2) != 0;
      down <= ($urandom % 2) != 0;
      @(posedge clk);
      if (en) begin
        if (up && ref_v < (1 << W) - 1) ref_v++;
        else if (down && ref_v > 0) ref_v--;
      end
      #1;
      checks++;
      if (int'(value) != ref_v || at_max != (ref_v == (1 << W) - 1) || at_min != (ref_v == 0)) begin
        failures++;
        $display("FAIL: step %0d value %0d expected %0d", i, value, ref_v);
      end
      if (ref_v == (1 << W) - 1) hit_max++;
      if (ref_v == 0) hit_min++;
    end
    checks++;
    if (hit_max == 0 || hit_min == 0) begin
      failures++;
      $display("FAIL: limits not reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
