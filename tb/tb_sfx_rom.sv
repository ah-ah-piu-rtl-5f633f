// tb_sfx_rom: checks the placeholder effect tones at the start, middle and
// end of each effect and past the last one, with one clock read latency.
module tb_sfx_rom;
  logic clk = 0;
  logic [13:0] addr;
  logic [15:0] q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  sfx_rom dut (.*);

  function automatic int expv(input int a);
    int p, ph, v;
    if (a >= 16184) return 0;
    p = (a < 6314) ? 24 : (a < 10650) ? 40 : 16;
    ph = a % p;
    v = (ph < p / 2) ? ph : p - ph;
    return v * 16000 / (p / 2) - 8000;
  endfunction

  initial begin
    int list [$] = '{0, 1, 6, 12, 6313, 6314, 6315, 8000, 10649, 10650, 10658, 16183, 16184, 16383};
    for (int k = 0; k < 300; k++) list.push_back($urandom_range(0, 16383));
    foreach (list[i]) begin
      @(negedge clk); addr = 14'(list[i]);
      @(negedge clk);
      checks++;
      if ($signed(q) != expv(list[i])) begin
        failures++; $display("addr %0d: got %0d expected %0d", list[i], $signed(q), expv(list[i]));
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
