// tb_sprite_axis: random coordinates and positions against a reference
// compare, including positions parked off screen; one clock latency.
module tb_sprite_axis;
  logic clk = 0, ce = 1;
  logic [9:0] coord;
  logic [15:0] pos;
  logic hit;
  logic [6:0] offset;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  sprite_axis #(.SIZE(66), .OW(7)) dut (.*);

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int c, p; bit eh;
      c = $urandom_range(0, 1023);
      p = (t % 7 == 0) ? 800 : (t % 11 == 0) ? 65000 : $urandom_range(0, 700);
      if (t % 3 == 0) c = p + $urandom_range(0, 70) - 2;
      if (c < 0) c = 0;
      if (c > 1023) c = 1023;
      @(negedge clk); coord = 10'(c); pos = 16'(p);
      @(negedge clk);
      eh = (c >= p) && (c < p + 66);
      checks++;
      if (hit !== eh || (eh && offset !== 7'(c - p))) begin
        failures++;
        $display("coord %0d pos %0d: hit %b off %0d", c, p, hit, offset);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
