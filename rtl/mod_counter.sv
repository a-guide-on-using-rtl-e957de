// mod_counter: free-running modulo-MOD counter (the echo address counter).
//
// While `en` is high the count advances by one per clock and wraps from
// MOD-1 to 0, so every RAM address is revisited exactly MOD enabled steps
// after it was last written: MOD is the echo delay D in samples. The
// reference design sets D = 10000 (226 ms at 44.1 kHz); the wrap rule is this
// design's reading of the statement that the memory size sets the echo delay.
module mod_counter #(
  parameter int unsigned MOD = 10000,
  localparam int unsigned W  = (MOD > 1) ? $clog2(MOD) : 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  output logic [W-1:0] count
);
  always_ff @(posedge clk) begin
    if (rst)
      count <= '0;
    else if (en)
      count <= (count == W'(MOD - 1)) ? '0 : count + 1'b1;
  end
endmodule
