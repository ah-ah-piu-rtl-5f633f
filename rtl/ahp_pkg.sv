// ahp_pkg: types and constants shared by the Ah-Ah-Piu FPGA blocks.
//
// Holds the 640x480 VGA timing, the map of the 32-entry VGA register buffer,
// the sprite sizes, the sound-effect address ranges of the effect ROM, the
// WM8731 configuration words and the Avalon-MM slave request bundle.
// The timing numbers, register numbers, sprite sizes and effect addresses are
// those of the original design; the Avalon bundle layout, the slave address
// map and the codec register values are this implementation's own choices.
package ahp_pkg;

  // ---------------------------------------------------------------- VGA timing
  localparam int HTOTAL       = 800;
  localparam int HSYNC        = 96;
  localparam int HBACK_PORCH  = 48;
  localparam int HACTIVE      = 640;
  localparam int HFRONT_PORCH = 16;
  localparam int VTOTAL       = 525;
  localparam int VSYNC        = 2;
  localparam int VBACK_PORCH  = 33;
  localparam int VACTIVE      = 480;
  localparam int VFRONT_PORCH = 10;

  // --------------------------------------------- VGA register buffer (32 x 16)
  // Positions are active-area pixel coordinates of the element's top-left
  // corner; software parks an unused element at 800 to hide it.
  typedef enum logic [4:0] {
    R_BOSS_X   = 5'd0,  R_BULLET_X = 5'd1,  R_PLAYER_X = 5'd2,
    R_ENEMY0_X = 5'd3,  R_ENEMY1_X = 5'd4,  R_ENEMY2_X = 5'd5,
    R_SPARE6   = 5'd6,  R_FIRE_X   = 5'd7,  R_FIRE_Y   = 5'd8,
    R_SCORE_D3 = 5'd9,  R_ENEMY2_Y = 5'd10, R_ENEMY1_Y = 5'd11,
    R_ENEMY0_Y = 5'd12, R_PLAYER_Y = 5'd13, R_BULLET_Y = 5'd14,
    R_BOSS_Y   = 5'd15, R_SCORE_D2 = 5'd16, R_SCORE_D1 = 5'd17,
    R_SCORE_D0 = 5'd18, R_BG_MODE  = 5'd19, R_BOX_X    = 5'd20,
    R_BOX_Y    = 5'd21, R_AMMO5_X  = 5'd22, R_AMMO4_X  = 5'd23,
    R_AMMO3_X  = 5'd24, R_AMMO2_X  = 5'd25, R_AMMO1_X  = 5'd26,
    R_LIFE3_X  = 5'd27, R_LIFE2_X  = 5'd28, R_LIFE1_X  = 5'd29,
    R_BOSS_FACE = 5'd30, R_PLAYER_FACE = 5'd31
  } vga_reg_e;

  // Background modes (register 19)
  localparam logic [15:0] BG_GAME  = 16'd0;
  localparam logic [15:0] BG_MENU  = 16'd1;
  localparam logic [15:0] BG_OVER_A = 16'd2;
  localparam logic [15:0] BG_OVER_B = 16'd3;
  localparam logic [15:0] BG_OVER_C = 16'd4;

  // Sprite sizes: width x height in pixels
  localparam int BOSS_W   = 60, BOSS_H   = 80;  // 3 frames
  localparam int BULLET_W = 66, BULLET_H = 25;
  localparam int PLAYER_W = 60, PLAYER_H = 60;  // 2 frames
  localparam int ENEMY_W  = 60, ENEMY_H  = 80;
  localparam int FIRE_W   = 60, FIRE_H   = 80;
  localparam int LIFE_W   = 30, LIFE_H   = 30;
  localparam int LIFE_Y   = 70;
  localparam int AMMO_W   = 20, AMMO_H   = 46;
  localparam int AMMO_Y   = 65;
  localparam int BOX_W    = 60, BOX_H    = 46;

  // Placeholder sprite art used when no pattern file is given: an ellipse
  // filling the box, one pixel of black (index 215) on its rim, a fill colour
  // that steps with the frame number, and transparent (index 0) corners.
  function automatic logic [7:0] sprite_placeholder(input int px, input int py,
                                                    input int w, input int h,
                                                    input int frame, input int color);
    int dx, dy, wi, hi;
    dx = 2 * px + 1 - w;          // doubled distance from the centre
    dy = 2 * py + 1 - h;
    wi = w - 4;                   // inner ellipse, two pixels in from the rim
    hi = h - 4;
    if (dx * dx * h * h + dy * dy * w * w > w * w * h * h) return 8'd0;
    if (dx * dx * hi * hi + dy * dy * wi * wi > wi * wi * hi * hi) return 8'd215;
    return 8'((color + 7 * frame) % 214 + 1);
  endfunction

  // Number of sprite instances composed over the background, in priority order
  localparam int NSPRITES = 16;

  // ------------------------------------------------------------- palette
  // 216-colour cube: index = 36*r + 6*g + b, component level k maps to
  // 255 - 51*k, so index 0 is white (used as "transparent" in sprites) and
  // index 215 is black. Indices 216..255 are unused and give black.
  function automatic logic [23:0] palette_rgb(input logic [7:0] idx);
    int unsigned i, r, g, b;
    i = int'(idx);
    if (i > 215) return 24'h000000;
    r = i / 36;
    g = (i / 6) % 6;
    b = i % 6;
    return {8'(255 - 51 * r), 8'(255 - 51 * g), 8'(255 - 51 * b)};
  endfunction

  // ------------------------------------------------------ sound effects
  localparam int SFX_AW = 14;                       // 16K words
  localparam logic [SFX_AW-1:0] SFX1_START = 14'd0;
  localparam logic [SFX_AW-1:0] SFX1_END   = 14'd6314;
  localparam logic [SFX_AW-1:0] SFX2_START = 14'd6314;
  localparam logic [SFX_AW-1:0] SFX2_END   = 14'd10650;
  localparam logic [SFX_AW-1:0] SFX3_START = 14'd10650;
  localparam logic [SFX_AW-1:0] SFX3_END   = 14'd16184;

  // ------------------------------------------------------ WM8731 set-up
  localparam logic [6:0] WM8731_I2C_ADDR = 7'h1A;   // 8'h34 with R/W = 0
  localparam int CODEC_NWORDS = 11;
  // {7-bit register address, 9-bit data}
  function automatic logic [15:0] codec_word(input int n);
    case (n)
      0:  return {7'd15, 9'h000};  // R15 reset
      1:  return {7'd0,  9'h017};  // R0  left line in 0 dB, unmuted
      2:  return {7'd1,  9'h017};  // R1  right line in 0 dB, unmuted
      3:  return {7'd2,  9'h079};  // R2  left headphone 0 dB
      4:  return {7'd3,  9'h079};  // R3  right headphone 0 dB
      5:  return {7'd4,  9'h011};  // R4  DACSEL, INSEL=0 (mic), MUTEMIC=0, MICBOOST
      6:  return {7'd5,  9'h000};  // R5  DAC unmuted, ADC high-pass on
      7:  return {7'd6,  9'h000};  // R6  everything powered up
      8:  return {7'd7,  9'h001};  // R7  slave, 16-bit, left justified
      9:  return {7'd8,  9'h00C};  // R8  8 kHz sampling
      default: return {7'd9, 9'h001};  // R9 active
    endcase
  endfunction

  // ------------------------------------------------------ Avalon-MM slave
  typedef struct packed {
    logic        chipselect;
    logic        read;
    logic        write;
    logic [5:0]  address;     // word address inside the slave
    logic [15:0] writedata;
  } av_req_t;

  // Slave select = bits [7:6] of the master's word address
  typedef enum logic [1:0] {
    SLV_VGA = 2'd0, SLV_AUDIO_OUT = 2'd1, SLV_AUDIO_IN = 2'd2, SLV_LED = 2'd3
  } slave_e;

endpackage
