// tb_layer_mux: random opaque patterns against a reference priority search;
// slot 0 has the highest priority, the background shows when no slot is
// opaque, and blanking forces black (215).
module tb_layer_mux;
  logic active;
  logic [15:0] opaque;
  logic [15:0][7:0] index;
  logic [7:0] bg_index, pixel;
  logic from_sprite;
  int checks = 0, failures = 0;
  layer_mux #(.N(16)) dut (.*);

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int e; bit es;
      active = ($urandom_range(0, 9) != 0);
      opaque = 16'($urandom) & 16'($urandom);
      if (t % 5 == 0) opaque = '0;
      for (int i = 0; i < 16; i++) index[i] = 8'($urandom_range(1, 215));
      bg_index = 8'($urandom);
      #1;
      e = bg_index; es = 0;
      for (int i = 0; i < 16; i++) if (opaque[i]) begin e = index[i]; es = 1; break; end
      if (!active) begin e = 215; es = 0; end
      checks++;
      if (int'(pixel) != e || from_sprite != es) begin
        failures++;
        if (failures < 10) $display("opaque %h: got %0d expected %0d", opaque, pixel, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
