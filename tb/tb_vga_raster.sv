// tb_vga_raster: pixel-exact check of the whole VGA controller.
//
// An SRAM model answers every address with a word computed from the address.
// The testbench writes all 32 registers at the start of vertical sync, then
// compares every active pixel of the next frame against a reference model:
// the first opaque element in priority order (boss, firework, ammo icons,
// bullet, player, lives, enemies, box) or, if none, the background byte
// (high byte on even columns) at the address given by the background layout
// (full-screen scene, menu or game-over overlay, score label and digits).
// Three frames are checked: the game view with overlapping elements, an
// element cut by the screen edge and score digits; the menu with a changed
// animation frame and an out-of-range frame number; a game-over view.
// It also checks sync timing: 800 pixels per line, 96-pixel HSYNC, 640 active
// pixels per line, 480 active lines and a 2-line VSYNC, and that VGA_SYNC_N
// stays low.
module tb_vga_raster;
  import ahp_pkg::*;
  logic clk = 0, reset_n = 0;
  av_req_t av;
  logic [15:0] readdata, sram_data;
  logic [17:0] sram_addr;
  logic vga_clk, vga_hs_n, vga_vs_n, vga_blank_n, vga_sync_n;
  logic [9:0] vga_r, vga_g, vga_b;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  vga_raster dut (.*);

  function automatic logic [15:0] sram_word(input int a);
    return {8'(a * 7 + 3), 8'(a * 13 + (a >> 8))};
  endfunction
  assign sram_data = sram_word(int'(sram_addr));

  // -------------------------------------------------- reference model
  logic [15:0] r [32];
  // element table: size, frames, column register, row register (-1: fixed row), frame register
  int ew [16] = '{60, 60, 20, 20, 20, 20, 20, 66, 60, 30, 30, 30, 60, 60, 60, 60};
  int eh [16] = '{80, 80, 46, 46, 46, 46, 46, 25, 60, 30, 30, 30, 80, 80, 80, 46};
  int ef [16] = '{3, 1, 1, 1, 1, 1, 1, 1, 2, 1, 1, 1, 1, 1, 1, 1};
  int exr[16] = '{0, 7, 26, 25, 24, 23, 22, 1, 2, 29, 28, 27, 3, 4, 5, 20};
  int eyr[16] = '{15, 8, -1, -1, -1, -1, -1, 14, 13, -1, -1, -1, 12, 11, 10, 21};
  int efr[16] = '{30, -1, -1, -1, -1, -1, -1, -1, 31, -1, -1, -1, -1, -1, -1, -1};
  int ecol[16] = '{30, 5, 100, 100, 100, 100, 100, 110, 40, 40, 40, 40, 180, 180, 180, 130};

  function automatic int bg_word_addr(input int x, input int y);
    int m;
    int dig [4];
    m = int'(r[19]);
    dig = '{int'(r[9][3:0]), int'(r[16][3:0]), int'(r[17][3:0]), int'(r[18][3:0])};
    if (m == 1 && x >= 150 && x < 450 && y >= 330 && y < 430)
      return 153600 + (y - 330) * 150 + (x - 150) / 2;
    if (m >= 2 && m <= 4 && x >= 200 && x < 350 && y >= 330 && y < 430)
      return 168600 + (m - 2) * 7500 + (y - 330) * 75 + (x - 200) / 2;
    if (m == 0 && y >= 440 && y < 470) begin
      if (x >= 200 && x < 260) return 193500 + (y - 440) * 30 + (x - 200) / 2;
      if (x >= 260 && x < 324)
        return 191100 + dig[(x - 260) / 16] * 240 + (y - 440) * 8 + ((x - 260) % 16) / 2;
    end
    return y * 320 + x / 2;
  endfunction

  function automatic logic [7:0] expected_index(input int x, input int y);
    int px, py, fr;
    logic [7:0] p;
    logic [15:0] w;
    for (int i = 0; i < 16; i++) begin
      px = int'(r[exr[i]]);
      py = (eyr[i] >= 0) ? int'(r[eyr[i]]) : ((i >= 2 && i <= 6) ? 65 : 70);
      fr = (efr[i] >= 0) ? int'(r[efr[i]]) : 0;
      if (fr >= ef[i]) fr = 0;
      if (x >= px && x < px + ew[i] && y >= py && y < py + eh[i]) begin
        p = sprite_placeholder(x - px, y - py, ew[i], eh[i], fr, ecol[i]);
        if (p != 0) return p;
      end
    end
    w = sram_word(bg_word_addr(x, y));
    return x[0] ? w[7:0] : w[15:8];
  endfunction

  // -------------------------------------------------- bus
  task automatic wr(input int a, input int d);
    @(negedge clk); av = '{chipselect:1, read:0, write:1, address:6'(a), writedata:16'(d)};
    @(negedge clk); av = '0;
    r[a] = 16'(d);
  endtask

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; if (failures < 20) $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  // -------------------------------------------------- pixel checker
  bit checking = 0;
  int ax = 0, ay = 0, frame_lines = 0, pix_bad = 0, sprite_pix = 0;
  bit prev_blank = 0;
  always @(posedge vga_clk) begin
    if (checking && vga_blank_n) begin
      logic [7:0] e;
      logic [23:0] rgb;
      e = expected_index(ax, ay);
      rgb = palette_rgb(e);
      checks++;
      if ({vga_r, vga_g, vga_b} != {rgb[23:16], 2'b00, rgb[15:8], 2'b00, rgb[7:0], 2'b00}) begin
        failures++;
        if (failures < 20) $display("pixel (%0d,%0d): got %h %h %h expected index %0d", ax, ay,
                                    vga_r, vga_g, vga_b, e);
      end
      if (e != sram_word(bg_word_addr(ax, ay))[ax[0] ? 7 : 15 -: 8]) sprite_pix++;
    end
    if (vga_blank_n) ax++;
    if (prev_blank && !vga_blank_n) begin ay++; ax = 0; end
    prev_blank = vga_blank_n;
    checks++;
    if (vga_sync_n !== 1'b0) failures++;
  end

  // -------------------------------------------------- sync timing
  int line_pix = 0, hs_low = 0, line_len = 0, vs_lines = 0;
  bit prev_hs = 1, prev_vs = 1;
  always @(posedge vga_clk) begin
    line_pix++;
    if (!vga_hs_n) hs_low++;
    if (prev_hs && !vga_hs_n) begin line_len = line_pix; line_pix = 0; end
    if (!prev_hs && vga_hs_n) begin
      if (checking) begin chk(hs_low, 96, "hsync width"); chk(line_len, 800, "line length"); end
      hs_low = 0;
    end
    if (prev_hs && !vga_hs_n && !vga_vs_n) vs_lines++;
    prev_hs = vga_hs_n;
  end

  task automatic next_frame();   // returns at the start of vertical sync
    @(negedge vga_vs_n);
  endtask

  task automatic check_frame(input string name);
    ay = 0; ax = 0; sprite_pix = 0; vs_lines = 0;
    checking = 1;
    @(posedge vga_vs_n);
    chk(vs_lines, 2, {name, ": vsync lines"});
    next_frame();
    checking = 0;
    chk(ay, 480, {name, ": active lines"});
    chk(int'(sprite_pix > 1000), 1, {name, ": elements drawn"});
  endtask

  initial begin
    av = '0;
    for (int i = 0; i < 32; i++) r[i] = '0;
    repeat (4) @(negedge clk); reset_n = 1;
    next_frame();
    // game view
    wr(0, 100); wr(15, 100); wr(30, 2);              // boss, frame 2
    wr(7, 130); wr(8, 120);                          // firework under the boss
    wr(26, 510); wr(25, 490); wr(24, 470); wr(23, 450); wr(22, 430);
    wr(1, 300); wr(14, 200);                         // bullet over the player
    wr(2, 320); wr(13, 210); wr(31, 1);              // player, frame 1
    wr(29, 330); wr(28, 300); wr(27, 270);
    wr(3, 400); wr(12, 300); wr(4, 420); wr(11, 320);
    wr(5, 600); wr(10, 400);                         // cut by the right edge
    wr(20, 50); wr(21, 455);                         // cut by the bottom edge
    wr(9, 1); wr(16, 2); wr(17, 3); wr(18, 4); wr(19, 0); wr(6, 0);
    next_frame();
    check_frame("game");
    // menu, boss frame 1, player frame number out of range
    wr(19, 1); wr(30, 1); wr(31, 3); wr(0, 160); wr(15, 300);
    next_frame();
    check_frame("menu");
    wr(19, 3); wr(30, 0); wr(2, 620); wr(13, 0);
    next_frame();
    check_frame("game over");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
