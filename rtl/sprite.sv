// sprite: one displayed element (boss, player, enemy, bullet, life icon...).
//
// A horizontal and a vertical sprite_axis decide whether the scan position
// lies inside the element's W x H box and give the column and row in it; the
// next stage reads the pattern memory at frame*W*H + row*W + col. The output
// index is the colour-map index of the pixel, and opaque is high when the
// scan is inside the box and the index is not 0 (transparent). Latency: two
// ce-cycles from x/y to opaque/index.
module sprite #(
  parameter int unsigned W      = 60,
  parameter int unsigned H      = 60,
  parameter int unsigned FRAMES = 1,
  parameter int unsigned COLOR  = 20,
  parameter string       INIT_FILE = ""
) (
  input  logic        clk,
  input  logic        ce,
  input  logic [9:0]  x,
  input  logic [9:0]  y,
  input  logic [15:0] pos_x,
  input  logic [15:0] pos_y,
  input  logic [15:0] frame,     // frame select; values >= FRAMES show frame 0
  output logic        opaque,
  output logic [7:0]  index
);
  localparam int unsigned AW = $clog2(W * H * FRAMES);
  localparam int unsigned CW = $clog2(W);
  localparam int unsigned RW = $clog2(H);

  logic          in_h, in_v, in_q;
  logic [CW-1:0] col;
  logic [RW-1:0] row;
  logic [AW-1:0] addr;
  logic [7:0]    pix;
  logic [15:0]   frame_q;

  sprite_axis #(.SIZE(W), .OW(CW)) u_h (.clk, .ce, .coord(x), .pos(pos_x), .hit(in_h), .offset(col));
  sprite_axis #(.SIZE(H), .OW(RW)) u_v (.clk, .ce, .coord(y), .pos(pos_y), .hit(in_v), .offset(row));

  always_ff @(posedge clk)
    if (ce) begin
      frame_q <= (frame < 16'(FRAMES)) ? frame : 16'd0;
      in_q    <= in_h && in_v;
    end

  assign addr = AW'(frame_q * (W * H) + row * W + col);

  sprite_rom #(.W(W), .H(H), .FRAMES(FRAMES), .COLOR(COLOR), .INIT_FILE(INIT_FILE))
    u_rom (.clk, .ce, .addr, .q(pix));

  assign index  = pix;
  assign opaque = in_q && (pix != 8'd0);
endmodule
