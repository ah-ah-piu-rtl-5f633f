// tb_vga_timing: runs two frames and checks line and frame length, sync
// pulse widths, the active window (640 x 480) and the x/y coordinates.
module tb_vga_timing;
  logic clk = 0, reset_n = 0, ce = 0;
  logic [9:0] hcount, vcount, x, y;
  logic active, hsync, vsync, line_end, frame_end;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  always @(posedge clk) ce <= reset_n ? ~ce : 1'b0;
  vga_timing dut (.*);

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    int pix, hs_cnt, act_cnt, act_lines, vs_lines, first_x, first_y, lines, clk_cnt;
    bit line_has_active, line_has_vs, xy_ok;
    repeat (4) @(posedge clk); reset_n = 1;
    // wait for the start of a frame
    do @(posedge clk); while (!(ce && frame_end));
    pix = 0; act_cnt = 0; act_lines = 0; vs_lines = 0; lines = 0; clk_cnt = 0; xy_ok = 1;
    hs_cnt = 0; first_x = -1; first_y = -1;
    line_has_active = 0; line_has_vs = 0;
    forever begin
      @(posedge clk); clk_cnt++;
      if (!ce) continue;
      pix++;
      if (lines == 0 && hsync) hs_cnt++;
      if (active) begin
        act_cnt++; line_has_active = 1;
        if (first_x < 0) begin first_x = hcount; first_y = vcount; end
        if (int'(x) != int'(hcount) - 144 || int'(y) != int'(vcount) - 35) xy_ok = 0;
      end
      if (vsync) line_has_vs = 1;
      if (line_end) begin
        lines++;
        if (line_has_active) act_lines++;
        if (line_has_vs) vs_lines++;
        line_has_active = 0; line_has_vs = 0;
      end
      if (frame_end) break;
    end
    chk(pix, 800 * 525, "pixels per frame");
    chk(clk_cnt, 2 * 800 * 525, "clocks per frame");
    chk(lines, 525, "lines per frame");
    chk(hs_cnt, 96, "hsync width");
    chk(vs_lines, 2, "vsync lines");
    chk(act_cnt, 640 * 480, "active pixels");
    chk(act_lines, 480, "active lines");
    chk(first_x, 144, "first active column");
    chk(first_y, 35, "first active line");
    chk(int'(xy_ok), 1, "x/y coordinates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
