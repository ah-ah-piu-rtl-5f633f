// bg_addr_gen: SRAM address of the background pixel under the scan.
//
// The SRAM holds 16-bit words of two colour indices, i.e. two horizontally
// adjacent pixels per word, so every image is stored at half its width in
// words. Layout (word addresses, as in the original design):
//   0      full-screen background, 320 words x 480 rows
//   153600 start menu, 150 x 100, shown at (150,330) in mode 1
//   168600 / 176100 / 183600 game-over images, 75 x 100, at (200,330), modes 2/3/4
//   191100 digits 0..9, 8 x 30 each (240 words per digit)
//   193500 "score" label, 30 x 30, at (200,440) in mode 0
// In mode 0 (game) the four score digits follow the label at x = 260, 276,
// 292, 308, selected by the digit registers (thousands first). Everywhere
// else the full-screen background is read at x/2 + 320*y. Purely
// combinational; x,y are active-area coordinates. The regions are half-open
// boxes exactly the size of their images; the address of the pixel under the
// scan is produced, the caller registers it and absorbs the SRAM latency.
module bg_addr_gen
  import ahp_pkg::*;
(
  input  logic [9:0]  x,
  input  logic [9:0]  y,
  input  logic [15:0] mode,
  input  logic [3:0]  digit3,   // thousands
  input  logic [3:0]  digit2,
  input  logic [3:0]  digit1,
  input  logic [3:0]  digit0,   // ones
  output logic [17:0] addr
);
  localparam int BG_WORDS_PER_ROW = 320;
  localparam int MENU_BASE  = 153600, MENU_X = 150, MENU_Y = 330, MENU_WW = 150, MENU_H = 100;
  localparam int OVER_X = 200, OVER_Y = 330, OVER_WW = 75, OVER_H = 100;
  localparam int OVER_A_BASE = 168600, OVER_B_BASE = 176100, OVER_C_BASE = 183600;
  localparam int DIGIT_BASE = 191100, DIGIT_WW = 8, DIGIT_H = 30, DIGIT_WORDS = 240;
  localparam int LABEL_BASE = 193500, LABEL_X = 200, LABEL_Y = 440, LABEL_WW = 30;
  localparam int DIGITS_X = 260;

  function automatic logic in_box(input int px, input int py, input int bx, input int by,
                                  input int bw, input int bh);
    return (px >= bx) && (px < bx + bw) && (py >= by) && (py < by + bh);
  endfunction

  always_comb begin
    int xi, yi, k;
    logic [3:0] d;
    xi = int'(x);
    yi = int'(y);
    addr = 18'(xi / 2 + yi * BG_WORDS_PER_ROW);
    k = (xi - DIGITS_X) / (2 * DIGIT_WW);
    unique case (k)
      0: d = digit3;
      1: d = digit2;
      2: d = digit1;
      default: d = digit0;
    endcase
    if (mode == BG_MENU && in_box(xi, yi, MENU_X, MENU_Y, 2 * MENU_WW, MENU_H))
      addr = 18'((xi - MENU_X) / 2 + (yi - MENU_Y) * MENU_WW + MENU_BASE);
    else if ((mode == BG_OVER_A || mode == BG_OVER_B || mode == BG_OVER_C) &&
             in_box(xi, yi, OVER_X, OVER_Y, 2 * OVER_WW, OVER_H))
      addr = 18'((xi - OVER_X) / 2 + (yi - OVER_Y) * OVER_WW +
                 (mode == BG_OVER_A ? OVER_A_BASE :
                  mode == BG_OVER_B ? OVER_B_BASE : OVER_C_BASE));
    else if (mode == BG_GAME && in_box(xi, yi, LABEL_X, LABEL_Y, 2 * LABEL_WW, DIGIT_H))
      addr = 18'((xi - LABEL_X) / 2 + (yi - LABEL_Y) * LABEL_WW + LABEL_BASE);
    else if (mode == BG_GAME && in_box(xi, yi, DIGITS_X, LABEL_Y, 4 * 2 * DIGIT_WW, DIGIT_H))
      addr = 18'(((xi - DIGITS_X) % (2 * DIGIT_WW)) / 2 + (yi - LABEL_Y) * DIGIT_WW +
                 DIGIT_BASE + int'(d) * DIGIT_WORDS);
  end
endmodule
