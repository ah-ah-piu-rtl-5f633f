// seg7_decoder: one decimal digit to an active-low seven-segment pattern.
//
// Segment order is {g,f,e,d,c,b,a} as wired on the DE2 HEX displays, a
// segment lights when its bit is 0. Digits 0..9 give the usual figures, as in
// the original design; any other value blanks the display, which is this
// implementation's choice (the original left it undefined). Purely
// combinational.
module seg7_decoder (
  input  logic [3:0] digit,
  output logic [6:0] seg_n
);
  always_comb begin
    unique case (digit)
      4'd0: seg_n = 7'b100_0000;
      4'd1: seg_n = 7'b111_1001;
      4'd2: seg_n = 7'b010_0100;
      4'd3: seg_n = 7'b011_0000;
      4'd4: seg_n = 7'b001_1001;
      4'd5: seg_n = 7'b001_0010;
      4'd6: seg_n = 7'b000_0010;
      4'd7: seg_n = 7'b111_1000;
      4'd8: seg_n = 7'b000_0000;
      4'd9: seg_n = 7'b001_0000;
      default: seg_n = 7'b111_1111;
    endcase
  end
endmodule
