// tb_sprite_rom: reads every word of a two-frame pattern memory and checks
// it against the placeholder figure worked out here (ellipse, black rim,
// transparent corners), with one clock read latency.
module tb_sprite_rom;
  logic clk = 0, ce = 1;
  logic [12:0] addr;
  logic [7:0] q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  sprite_rom #(.W(60), .H(60), .FRAMES(2), .COLOR(40)) dut (.*);

  function automatic int model(input int c, input int r, input int f);
    real dx, dy, e_out, e_in;
    dx = (c + 0.5) - 30.0; dy = (r + 0.5) - 30.0;
    e_out = (dx * dx) / (30.0 * 30.0) + (dy * dy) / (30.0 * 30.0);
    e_in  = (dx * dx) / (28.0 * 28.0) + (dy * dy) / (28.0 * 28.0);
    if (e_out > 1.0) return 0;
    if (e_in > 1.0) return 215;
    return (40 + 7 * f) % 214 + 1;
  endfunction

  initial begin
    int n_trans = 0, n_rim = 0;
    for (int f = 0; f < 2; f++)
      for (int r = 0; r < 60; r++)
        for (int c = 0; c < 60; c++) begin
          int e;
          @(negedge clk); addr = 13'(f * 3600 + r * 60 + c);
          @(negedge clk);
          e = model(c, r, f);
          checks++;
          if (int'(q) != e) begin
            failures++;
            if (failures < 10) $display("f%0d r%0d c%0d: got %0d expected %0d", f, r, c, q, e);
          end
          if (e == 0) n_trans++;
          if (e == 215) n_rim++;
        end
    checks++;
    if (n_trans == 0 || n_rim == 0) failures++;
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
