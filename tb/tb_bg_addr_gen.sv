// tb_bg_addr_gen: checks SRAM addresses for the full-screen background and
// for every image region (menu, three game-over images, score label and the
// four score digits), with values worked out by hand from the memory layout.
module tb_bg_addr_gen;
  logic [9:0] x, y;
  logic [15:0] mode;
  logic [3:0] digit3, digit2, digit1, digit0;
  logic [17:0] addr;
  int checks = 0, failures = 0;
  bg_addr_gen dut (.*);

  task automatic chk(input int m, input int xx, input int yy, input int exp);
    mode = 16'(m); x = 10'(xx); y = 10'(yy);
    #1;
    checks++;
    if (int'(addr) != exp) begin
      failures++;
      $display("mode %0d (%0d,%0d): got %0d expected %0d", m, xx, yy, addr, exp);
    end
  endtask

  initial begin
    digit3 = 4'd1; digit2 = 4'd2; digit1 = 4'd3; digit0 = 4'd4;   // score 1234
    chk(0, 0, 0, 0);
    chk(0, 1, 0, 0);
    chk(0, 2, 0, 1);
    chk(0, 639, 479, 319 + 479 * 320);       // 153599, last background word
    chk(0, 150, 330, 75 + 330 * 320);        // menu region ignored in mode 0
    chk(1, 150, 330, 153600);                // menu first word
    chk(1, 449, 429, 153600 + 149 + 99 * 150); // menu last word = 168599
    chk(1, 450, 330, 225 + 330 * 320);       // just right of the menu
    chk(1, 149, 330, 74 + 330 * 320);
    chk(2, 200, 330, 168600);
    chk(3, 201, 331, 176100 + 75);
    chk(4, 349, 429, 183600 + 74 + 99 * 75);  // 191099
    chk(4, 350, 429, 175 + 429 * 320);
    chk(0, 200, 440, 193500);                // score label
    chk(0, 259, 469, 193500 + 29 + 29 * 30);
    chk(1, 200, 440, 100 + 440 * 320);       // label only in game mode
    chk(0, 260, 440, 191100 + 1 * 240);      // thousands digit = 1
    chk(0, 275, 441, 191100 + 1 * 240 + 7 + 8);
    chk(0, 276, 440, 191100 + 2 * 240);      // hundreds = 2
    chk(0, 292, 450, 191100 + 3 * 240 + 80); // tens = 3
    chk(0, 323, 469, 191100 + 4 * 240 + 7 + 29 * 8); // ones = 4
    chk(0, 324, 440, 162 + 440 * 320);
    chk(0, 260, 470, 130 + 470 * 320);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
