// vga_timing: raster counters for 640x480 at a 25 MHz pixel rate.
//
// hcount runs 0..HTOTAL-1 and vcount 0..VTOTAL-1, advancing once per pixel
// (when ce is high). A line starts with the HSYNC pulse, then the back porch,
// the 640 active pixels and the front porch; a frame likewise in lines. The
// numbers (800/96/48/640/16 and 525/2/33/480/10) are the original design's.
// Outputs are decoded from the counter registers in the same cycle: x/y are
// the active-area coordinates (meaningful while active is high), hsync and
// vsync are high during the sync pulse (the pins are active low, the caller
// inverts). line_end/frame_end mark the last pixel of a line/frame.
module vga_timing
  import ahp_pkg::*;
(
  input  logic       clk,
  input  logic       reset_n,
  input  logic       ce,
  output logic [9:0] hcount,
  output logic [9:0] vcount,
  output logic [9:0] x,
  output logic [9:0] y,
  output logic       active,
  output logic       hsync,
  output logic       vsync,
  output logic       line_end,
  output logic       frame_end
);
  localparam int HSTART = HSYNC + HBACK_PORCH;
  localparam int VSTART = VSYNC + VBACK_PORCH;

  assign line_end  = (hcount == 10'(HTOTAL - 1));
  assign frame_end = line_end && (vcount == 10'(VTOTAL - 1));

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      hcount <= '0;
      vcount <= '0;
    end else if (ce) begin
      if (line_end) begin
        hcount <= '0;
        vcount <= frame_end ? '0 : vcount + 10'd1;
      end else begin
        hcount <= hcount + 10'd1;
      end
    end
  end

  assign hsync  = (hcount < 10'(HSYNC));
  assign vsync  = (vcount < 10'(VSYNC));
  assign active = (hcount >= 10'(HSTART)) && (hcount < 10'(HSTART + HACTIVE)) &&
                  (vcount >= 10'(VSTART)) && (vcount < 10'(VSTART + VACTIVE));
  assign x = hcount - 10'(HSTART);
  assign y = vcount - 10'(VSTART);
endmodule
