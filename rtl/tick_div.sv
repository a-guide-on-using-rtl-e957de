// tick_div: clock divider producing a clock-enable pulse.
//
// A counter runs from 0 to DIV-1 on every clock and `tick` is high for the
// one cycle in which it wraps, so the pulse rate is f_clk / DIV. The design
// uses it for the 44.1 kHz sample enable (DIV = 2268 from 100 MHz, giving
// 44.09 kHz) and for the 2 Hz button-repeat enable. The reference design derives
// these as separate clocks; here they are enables in one clock domain, which
// is this design's choice. The first tick comes DIV cycles after reset.
module tick_div #(
  parameter int unsigned DIV = 2268
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
