// tb_sp_ram: random accesses against an array model of a read-before-write
// RAM with one cycle of read latency: dout after an enabled access shows the
// word stored before that access's write; a disabled cycle changes nothing.
// The RAM starts all zero; dout is only defined after the first access.
module tb_sp_ram;
  localparam int DEPTH = 24;
  logic clk = 0, en = 0, we = 0;
  logic [4:0] addr = 0;
  logic [17:0] din = 0, dout;
  logic [17:0] model [DEPTH];
  logic [17:0] exp_q;
  int checks = 0, failures = 0;
  bit valid = 0;
  always #5 clk = ~clk;

  sp_ram #(.DEPTH(DEPTH), .W(18)) dut (.clk, .en, .we, .addr, .din, .dout);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    exp_q = '0;
    @(posedge clk); #1;
    for (int i = 0; i < 4000; i++) begin
      en   <= ($urandom % 4) != 0;
      we   <= ($urandom % 2) != 0;
      addr <= 5'($urandom % DEPTH);
      din  <= 18'($urandom);
      @(posedge clk);
      if (en) begin
        valid = 1;
        exp_q = model[addr];
        if (we) model[addr] = din;
      end
      #1;
      if (!valid) continue;
      checks++;
      if (dout != exp_q) begin
        failures++;
        $display("FAIL: access %0d dout %h expected %h", i, dout, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
