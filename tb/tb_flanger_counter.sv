// tb_flanger_counter: with a held limit L the counter must run 0..L+1 and
// restart (period L+2); with a changing limit it must follow the rule
// "next = (count > limit) ? 0 : count + 1". Checked against a model.
module tb_flanger_counter;
  logic clk = 0, rst = 1, en = 0;
  logic [6:0] limit = 0;
  logic [13:0] count;
  int checks = 0, failures = 0, ref_c, last0, resets;
  always #5 clk = ~clk;

  flanger_counter #(.W(14), .LW(7)) dut (.clk, .rst, .en, .limit, .count);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    ref_c = 0;
    // held limits: measure the period
    for (int l = 0; l < 6; l++) begin
      int lim, period, n0;
      lim = (l == 5) ? 100 : l * 7;
      limit <= 7'(lim);
      en <= 1;
      n0 = 0; period = 0; last0 = -1;
      for (int c = 0; c < 4 * (lim + 2) + 4; c++) begin
        @(posedge clk); #1;
        if (count == 0) begin
          if (last0 >= 0) begin
            n0++;
            if (n0 >= 2) begin
              checks++;
              if (c - last0 != lim + 2) begin
                failures++;
                $display("FAIL: limit %0d period %0d", lim, c - last0);
              end
            end
          end
          last0 = c;
        end
      end
    end
    // random limit and enable against the model
    @(posedge clk); #1;
    ref_c = int'(count);
    resets = 0;
    for (int i = 0; i < 3000; i++) begin
      en    <= ($urandom % 4) != 0;
      if ($urandom % 16 == 0) limit <= 7'($urandom % 101);
      @(posedge clk);
      if (en) begin
        if (ref_c > int'(limit)) begin ref_c = 0; resets++; end
        else ref_c++;
      end
      #1;
      checks++;
      if (int'(count) != ref_c) begin
        failures++;
        $display("FAIL: count %0d expected %0d", count, ref_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
