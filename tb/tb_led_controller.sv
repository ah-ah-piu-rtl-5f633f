// tb_led_controller: writes score digits over the bus and checks the four
// seven-segment outputs and the read-back (one clock read latency).
module tb_led_controller;
  import ahp_pkg::*;
  logic clk = 0, reset_n = 0;
  av_req_t av;
  logic [15:0] readdata;
  logic [6:0] hex0, hex1, hex2, hex3;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  led_controller dut (.*);

  // segment patterns {g..a}, active low, for 0..9
  logic [6:0] pat [10] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19, 7'h12, 7'h02, 7'h78, 7'h00, 7'h10};

  task automatic wr(input int a, input int d);
    @(negedge clk); av = '{chipselect:1, read:0, write:1, address:6'(a), writedata:16'(d)};
    @(negedge clk); av = '0;
  endtask
  task automatic rd(input int a, output logic [15:0] d);
    @(negedge clk); av = '{chipselect:1, read:1, write:0, address:6'(a), writedata:0};
    @(negedge clk); av = '0; d = readdata;
  endtask
  task automatic chk(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    logic [15:0] d;
    av = '0;
    repeat (3) @(negedge clk); reset_n = 1;
    chk(16'(hex0), 16'(pat[0]), "reset hex0");
    for (int t = 0; t < 20; t++) begin
      int s;
      s = $urandom_range(0, 9999);
      wr(0, s % 10); wr(1, (s / 10) % 10); wr(2, (s / 100) % 10); wr(3, s / 1000);
      chk(16'(hex0), 16'(pat[s % 10]), "hex0");
      chk(16'(hex1), 16'(pat[(s / 10) % 10]), "hex1");
      chk(16'(hex2), 16'(pat[(s / 100) % 10]), "hex2");
      chk(16'(hex3), 16'(pat[s / 1000]), "hex3");
      rd(2, d); chk(d, 16'((s / 100) % 10), "readback");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
