// tb_sprite: scans a 200 x 150 window around a sprite and checks opaque and
// index two clocks after each coordinate against the expected box, frame and
// placeholder pattern; also checks frame switching and hiding at 800.
module tb_sprite;
  import ahp_pkg::*;
  logic clk = 0, ce = 1;
  logic [9:0] x, y;
  logic [15:0] pos_x, pos_y, frame;
  logic opaque;
  logic [7:0] index;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  sprite #(.W(60), .H(80), .FRAMES(3), .COLOR(30)) dut (.*);

  // expected values in flight, two stages
  bit   e_op [2];
  int   e_ix [2];
  int   n_opaque = 0;

  task automatic scan(input int px, input int py, input int f, input bit hidden);
    pos_x = 16'(hidden ? 800 : px); pos_y = 16'(py); frame = 16'(f);
    for (int yy = py - 10; yy < py + 100; yy++)
      for (int xx = px - 20; xx < px + 80; xx++) begin
        @(negedge clk);
        // compare the result of the coordinate presented two clocks ago
        checks++;
        if (opaque !== e_op[1] || (e_op[1] && int'(index) != e_ix[1])) begin
          failures++;
          if (failures < 10) $display("(%0d,%0d) f%0d: opaque %b idx %0d exp %b %0d",
                                      xx, yy, f, opaque, index, e_op[1], e_ix[1]);
        end
        if (opaque) n_opaque++;
        e_op[1] = e_op[0]; e_ix[1] = e_ix[0];
        x = 10'(xx); y = 10'(yy);
        begin
          bit inbox;
          int ff, v;
          inbox = !hidden && xx >= px && xx < px + 60 && yy >= py && yy < py + 80;
          ff = (f < 3) ? f : 0;
          v = inbox ? int'(sprite_placeholder(xx - px, yy - py, 60, 80, ff, 30)) : 0;
          e_op[0] = inbox && v != 0;
          e_ix[0] = v;
        end
      end
  endtask

  initial begin
    x = 0; y = 0; pos_x = 800; pos_y = 800; frame = 0;
    e_op = '{0, 0}; e_ix = '{0, 0};
    repeat (3) @(negedge clk);
    scan(100, 50, 0, 0);
    scan(300, 200, 2, 0);
    scan(20, 20, 5, 0);      // out-of-range frame shows frame 0
    scan(100, 50, 1, 1);     // parked at 800: never visible
    checks++;
    if (n_opaque == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
