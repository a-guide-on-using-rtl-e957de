// tb_tick_div: checks the divider's pulse spacing and the first pulse time.
// DIV = 7: after reset the first tick must come 7 cycles after release and
// every later tick exactly 7 cycles after the previous one, one cycle wide.
module tb_tick_div;
  localparam int DIV = 7;
  logic clk = 0, rst = 1, tick;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  tick_div #(.DIV(DIV)) dut (.clk, .rst, .tick);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, last, n;
    repeat (3) @(posedge clk);
    rst <= 0;
    cyc = 0; last = 0; n = 0;
    while (n < 50) begin
      @(posedge clk);
      #1;
      cyc++;
      if (tick) begin
        checks++;
        if (cyc - last != DIV) begin
          failures++;
          $display("FAIL: tick spacing %0d, expected %0d", cyc - last, DIV);
        end
        last = cyc;
        n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
