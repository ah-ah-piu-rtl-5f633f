// sprite_rom: pattern memory of one element, one colour-map index per pixel.
//
// Holds FRAMES images of W x H pixels stored row by row, frame after frame,
// so the pixel (col,row) of frame f is at f*W*H + row*W + col. Several frames
// of one element give its animation (software picks the frame). Index 0 is
// transparent. Read is synchronous: q shows the addressed byte one ce-cycle
// later. Contents come from INIT_FILE (hex, one byte per line) when given;
// otherwise a placeholder figure is computed (ahp_pkg::sprite_placeholder),
// because the original game art is not part of this design.
module sprite_rom #(
  parameter int unsigned W      = 60,
  parameter int unsigned H      = 60,
  parameter int unsigned FRAMES = 1,
  parameter int unsigned COLOR  = 20,     // placeholder fill colour
  parameter string       INIT_FILE = "",
  parameter int unsigned AW     = $clog2(W * H * FRAMES)
) (
  input  logic          clk,
  input  logic          ce,
  input  logic [AW-1:0] addr,
  output logic [7:0]    q
);
  localparam int unsigned DEPTH = W * H * FRAMES;
  logic [7:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "")
      $readmemh(INIT_FILE, mem);
    else
      for (int f = 0; f < int'(FRAMES); f++)
        for (int r = 0; r < int'(H); r++)
          for (int c = 0; c < int'(W); c++)
            mem[f * W * H + r * W + c] =
              ahp_pkg::sprite_placeholder(c, r, W, H, f, COLOR);
  end

  always_ff @(posedge clk)
    if (ce) q <= mem[addr];
endmodule
