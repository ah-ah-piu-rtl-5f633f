// sprite_axis: position control of one displayed element along one axis.
//
// Each element has one of these for the horizontal and one for the vertical
// direction. From the current scan coordinate, the element's position
// (software register, top-left corner in active-area pixels) and its length
// along the axis, it flags whether the scan is inside the element and gives
// the offset into the pattern (0 at the element's first pixel). Both outputs
// are registered: they describe the coordinate presented one ce-cycle
// earlier. Positions up to 65535 are compared without wrap, so an element
// parked at 800 is never shown. The original computed the same thing with a
// running counter (the vertical one stepped at each line end); comparing
// directly is this implementation's choice.
module sprite_axis #(
  parameter int unsigned SIZE = 60,
  parameter int unsigned OW   = 7      // offset width, must hold SIZE-1
) (
  input  logic          clk,
  input  logic          ce,
  input  logic [9:0]    coord,
  input  logic [15:0]   pos,
  output logic          hit,
  output logic [OW-1:0] offset
);
  logic [16:0] c17, p17, diff;
  assign c17  = {7'd0, coord};
  assign p17  = {1'b0, pos};
  assign diff = c17 - p17;

  always_ff @(posedge clk) begin
    if (ce) begin
      hit    <= (c17 >= p17) && (diff < 17'(SIZE));
      offset <= OW'(diff);
    end
  end
endmodule
