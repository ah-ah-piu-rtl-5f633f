// color_map: colour index to 24-bit RGB.
//
// Every pattern pixel and every background byte is an 8-bit index into a
// 216-entry colour map (the 6x6x6 "web" colour cube), each entry holding all
// three 8-bit components in one 24-bit word so a single lookup yields the
// pixel. Entry 36*r + 6*g + b has components 255-51*r, 255-51*g, 255-51*b;
// entry 0 is white and entry 215 black, as in the original table. The table
// is computed by a function instead of being stored; indices 216..255 are
// unused and return black (own choice). One clock of latency when ce is high.
module color_map
  import ahp_pkg::*;
(
  input  logic        clk,
  input  logic        ce,
  input  logic [7:0]  index,
  output logic [23:0] rgb
);
  always_ff @(posedge clk)
    if (ce) rgb <= palette_rgb(index);
endmodule
