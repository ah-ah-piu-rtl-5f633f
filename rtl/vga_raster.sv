// vga_raster: the VGA controller of the game.
//
// Draws a 640x480 picture at 60 Hz from a 50 MHz clock (pixel rate 25 MHz,
// one pixel every second clock). The picture is four layers deep:
//   layer 3  boss (3 frames), firework, five ammo icons
//   layer 2  bullet, player (2 frames), three life icons
//   layer 1  three enemies, ammo box
//   layer 0  SRAM background: scene, start menu, game-over image, score
// Every element is a sprite whose position, and for the boss and player the
// animation frame, come from the 32-register buffer that software writes over
// the Avalon-MM slave port. Sprite pixels are colour-map indices (0 is
// transparent); the background is read from the external SRAM, two pixels
// per 16-bit word, at an address from bg_addr_gen. layer_mux keeps the first
// opaque layer and color_map turns the index into RGB.
//
// Pipeline (one stage per pixel): s0 raster counters; s1 axis compare and
// SRAM address register; s2 pattern ROM read and SRAM data capture (the
// asynchronous SRAM has the whole pixel period, 40 ns, to answer); s3 layer
// choice; s4 colour lookup and output registers. Syncs and blanking travel
// through the same stages, so an element whose register holds (X,Y) appears
// with its top-left pixel exactly at active column X, row Y. Even columns
// use the SRAM word's high byte, odd columns the low byte.
//
// The layer contents, element sizes, register map and SRAM layout follow the
// original design; the pipeline and its exact alignment are this
// implementation's own.
//
// Of vga_timing's outputs only x, y, active and the syncs are used; the raw
// counters and line/frame markers, and layer_mux's from_sprite flag, are not
// needed here; lint reports them as unused.
module vga_raster
  import ahp_pkg::*;
(
  input  logic        clk,          // 50 MHz
  input  logic        reset_n,
  // Avalon-MM slave (register buffer)
  input  av_req_t     av,
  output logic [15:0] readdata,
  // background SRAM, read only
  output logic [17:0] sram_addr,
  input  logic [15:0] sram_data,
  // VGA DAC
  output logic        vga_clk,
  output logic        vga_hs_n,
  output logic        vga_vs_n,
  output logic        vga_blank_n,
  output logic        vga_sync_n,
  output logic [9:0]  vga_r,
  output logic [9:0]  vga_g,
  output logic [9:0]  vga_b
);
  // ---------------------------------------------------------- sprite table
  function automatic int spr_w(input int i);
    case (i)
      0: return BOSS_W;   1: return FIRE_W;   2, 3, 4, 5, 6: return AMMO_W;
      7: return BULLET_W; 8: return PLAYER_W; 9, 10, 11: return LIFE_W;
      12, 13, 14: return ENEMY_W;  default: return BOX_W;
    endcase
  endfunction
  function automatic int spr_h(input int i);
    case (i)
      0: return BOSS_H;   1: return FIRE_H;   2, 3, 4, 5, 6: return AMMO_H;
      7: return BULLET_H; 8: return PLAYER_H; 9, 10, 11: return LIFE_H;
      12, 13, 14: return ENEMY_H;  default: return BOX_H;
    endcase
  endfunction
  function automatic int spr_frames(input int i);
    case (i)
      0: return 3;  8: return 2;  default: return 1;
    endcase
  endfunction
  // register holding the column
  function automatic int spr_xreg(input int i);
    case (i)
      0: return int'(R_BOSS_X);   1: return int'(R_FIRE_X);
      2: return int'(R_AMMO1_X);  3: return int'(R_AMMO2_X);  4: return int'(R_AMMO3_X);
      5: return int'(R_AMMO4_X);  6: return int'(R_AMMO5_X);
      7: return int'(R_BULLET_X); 8: return int'(R_PLAYER_X);
      9: return int'(R_LIFE1_X);  10: return int'(R_LIFE2_X); 11: return int'(R_LIFE3_X);
      12: return int'(R_ENEMY0_X); 13: return int'(R_ENEMY1_X); 14: return int'(R_ENEMY2_X);
      default: return int'(R_BOX_X);
    endcase
  endfunction
  // register holding the row, or -1 for the fixed rows of the icons
  function automatic int spr_yreg(input int i);
    case (i)
      0: return int'(R_BOSS_Y);   1: return int'(R_FIRE_Y);   7: return int'(R_BULLET_Y);
      8: return int'(R_PLAYER_Y); 12: return int'(R_ENEMY0_Y); 13: return int'(R_ENEMY1_Y);
      14: return int'(R_ENEMY2_Y); 15: return int'(R_BOX_Y);  default: return -1;
    endcase
  endfunction
  function automatic int spr_yconst(input int i);
    return (i >= 2 && i <= 6) ? AMMO_Y : LIFE_Y;
  endfunction
  function automatic int spr_framereg(input int i);
    case (i)
      0: return int'(R_BOSS_FACE);  8: return int'(R_PLAYER_FACE);  default: return -1;
    endcase
  endfunction
  // placeholder colours: one per kind of element
  function automatic int spr_color(input int i);
    case (i)
      0: return 30;  1: return 5;  2, 3, 4, 5, 6: return 100;  7: return 110;
      8: return 40;  9, 10, 11: return 40;  12, 13, 14: return 180;  default: return 130;
    endcase
  endfunction

  // ---------------------------------------------------------- pixel clock
  logic pix_phase, ce;
  always_ff @(posedge clk)
    if (!reset_n) pix_phase <= 1'b0;
    else          pix_phase <= ~pix_phase;
  assign ce      = pix_phase;
  assign vga_clk = pix_phase;

  // ---------------------------------------------------------- registers
  logic [31:0][15:0] regs;
  vga_regfile u_regs (.clk, .reset_n, .av, .readdata, .regs);

  // ---------------------------------------------------------- s0: raster
  logic [9:0] hcount, vcount, x, y;
  logic       active0, hs0, vs0, line_end, frame_end;
  vga_timing u_timing (.clk, .reset_n, .ce, .hcount, .vcount, .x, .y,
                       .active(active0), .hsync(hs0), .vsync(vs0),
                       .line_end, .frame_end);

  // ---------------------------------------------------------- s1/s2: sprites
  logic [NSPRITES-1:0]      opaque2;
  logic [NSPRITES-1:0][7:0] index2;

  for (genvar i = 0; i < NSPRITES; i++) begin : g_spr
    localparam int XR = spr_xreg(i);
    localparam int YR = spr_yreg(i);
    localparam int FR = spr_framereg(i);
    logic [15:0] py, fr;
    if (YR >= 0) begin : g_yreg
      assign py = regs[YR];
    end else begin : g_yconst
      assign py = 16'(spr_yconst(i));
    end
    if (FR >= 0) begin : g_freg
      assign fr = regs[FR];
    end else begin : g_fconst
      assign fr = 16'd0;
    end
    sprite #(.W(spr_w(i)), .H(spr_h(i)), .FRAMES(spr_frames(i)), .COLOR(spr_color(i)))
      u_sprite (.clk, .ce, .x, .y, .pos_x(regs[XR]), .pos_y(py), .frame(fr),
                .opaque(opaque2[i]), .index(index2[i]));
  end

  // ---------------------------------------------------------- s1/s2: background
  logic [17:0] bg_addr;
  bg_addr_gen u_bg (.x, .y, .mode(regs[R_BG_MODE]),
                    .digit3(regs[R_SCORE_D3][3:0]), .digit2(regs[R_SCORE_D2][3:0]),
                    .digit1(regs[R_SCORE_D1][3:0]), .digit0(regs[R_SCORE_D0][3:0]),
                    .addr(bg_addr));

  logic       active1, hs1, vs1, odd1;
  logic       active2, hs2, vs2;
  logic [7:0] bg_index2;
  always_ff @(posedge clk) begin
    if (!reset_n) begin
      sram_addr <= '0;
      {active1, hs1, vs1, odd1} <= '0;
      {active2, hs2, vs2} <= '0;
      bg_index2 <= '0;
    end else if (ce) begin
      sram_addr <= bg_addr;
      active1   <= active0;
      hs1       <= hs0;
      vs1       <= vs0;
      odd1      <= x[0];
      active2   <= active1;
      hs2       <= hs1;
      vs2       <= vs1;
      bg_index2 <= odd1 ? sram_data[7:0] : sram_data[15:8];
    end
  end

  // ---------------------------------------------------------- s3: layers
  logic [7:0] pixel2, pixel3;
  logic       active3, hs3, vs3, from_sprite2;
  layer_mux #(.N(NSPRITES)) u_mux (.active(active2), .opaque(opaque2), .index(index2),
                                   .bg_index(bg_index2), .pixel(pixel2),
                                   .from_sprite(from_sprite2));
  always_ff @(posedge clk) begin
    if (!reset_n) begin
      pixel3 <= 8'd215;
      {active3, hs3, vs3} <= '0;
    end else if (ce) begin
      pixel3  <= pixel2;
      active3 <= active2;
      hs3     <= hs2;
      vs3     <= vs2;
    end
  end

  // ---------------------------------------------------------- s4: colour out
  logic [23:0] rgb4;
  logic        active4, hs4, vs4;
  color_map u_cmap (.clk, .ce, .index(pixel3), .rgb(rgb4));
  always_ff @(posedge clk) begin
    if (!reset_n) begin
      {active4, hs4, vs4} <= '0;
    end else if (ce) begin
      active4 <= active3;
      hs4     <= hs3;
      vs4     <= vs3;
    end
  end

  assign vga_r       = {rgb4[23:16], 2'b00};
  assign vga_g       = {rgb4[15:8],  2'b00};
  assign vga_b       = {rgb4[7:0],   2'b00};
  assign vga_hs_n    = ~hs4;
  assign vga_vs_n    = ~vs4;
  assign vga_blank_n = active4;
  assign vga_sync_n  = 1'b0;
endmodule
