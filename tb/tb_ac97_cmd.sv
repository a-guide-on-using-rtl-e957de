// tb_ac97_cmd: after each `ready` pulse the state machine must present the
// next of its five register writes for one cycle with latching_cmd, in
// order 0x02, 0x04, 0x18, 0x1A, 0x1C and repeating, with the volume turned
// into attenuation 31 - volume on both channels and the source copied to
// both channel fields of the record-select register. Volume and source change
// at random between pulses.
module tb_ac97_cmd;
  logic clk = 0, rst = 1, ready = 0;
  logic [4:0] volume = 0;
  logic [2:0] source = 0;
  logic [7:0] cmd_addr;
  logic [15:0] cmd_data;
  logic latching_cmd;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ac97_cmd dut (.clk, .rst, .ready, .volume, .source, .cmd_addr, .cmd_data, .latching_cmd);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0]  ea [5];
    logic [15:0] ed;
    int lat;
    ea = '{8'h02, 8'h04, 8'h18, 8'h1A, 8'h1C};
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 60; i++) begin
      logic [4:0] att;
      volume <= 5'($urandom);
      source <= 3'($urandom);
      repeat (3) @(posedge clk);
      att = 5'd31 - volume;
      case (i % 5)
        0, 1:    ed = {3'b0, att, 3'b0, att};
        2:       ed = 16'h0808;
        3:       ed = {5'b0, source, 5'b0, source};
        default: ed = 16'h0000;
      endcase
      ready <= 1;
      @(posedge clk);
      ready <= 0;
      // the command must appear for exactly one cycle
      lat = 0;
      for (int c = 0; c < 4; c++) begin
        #1;
        if (latching_cmd) begin
          lat++;
          checks++;
          if (cmd_addr != ea[i % 5] || cmd_data != ed) begin
            failures++;
            $display("FAIL: cmd %0d got %h:%h expected %h:%h", i, cmd_addr, cmd_data, ea[i % 5], ed);
          end
        end
        @(posedge clk);
      end
      checks++;
      if (lat != 1) begin failures++; $display("FAIL: latching_cmd high %0d cycles", lat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
