// btn_updown: button-controlled up/down register with saturation.
//
// On each cycle where `en` is high (the 2 Hz repeat enable) the value goes up
// by one while `up` is held and it is below all-ones, else down by one while
// `down` is held and it is above zero; `up` wins when both are held. Holding
// a button therefore steps the value twice a second. This is the volume
// control of the reference design (5 bits, btn1 up, btn0 down); the same register
// with W = 16 holds the DDS phase increment, stepped by the delta_plus and
// delta_minus buttons, which is this design's reading of how those buttons act.
// at_max / at_min are the reference design's max_vol / min_vol flags.
module btn_updown #(
  parameter int unsigned W    = 5,
  parameter logic [W-1:0] INIT = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         up,
  input  logic         down,
  output logic [W-1:0] value,
  output logic         at_max,
  output logic         at_min
);
  assign at_max = (value == '1);
  assign at_min = (value == '0);

  always_ff @(posedge clk) begin
    if (rst)
      value <= INIT;
    else if (en) begin
      if (up && !at_max)
        value <= value + 1'b1;
      else if (down && !at_min)
        value <= value - 1'b1;
    end
  end
endmodule
