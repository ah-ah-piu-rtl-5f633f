// tb_color_map: checks the 216-colour map against entries copied from the
// original table and against a nested walk of the colour cube, and the one
// clock latency.
module tb_color_map;
  logic clk = 0, ce = 1;
  logic [7:0] index;
  logic [23:0] rgb;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  color_map dut (.*);

  task automatic chk(input int idx, input logic [23:0] exp);
    @(negedge clk); index = 8'(idx);
    @(negedge clk);
    checks++;
    if (rgb !== exp) begin failures++; $display("index %0d: got %h expected %h", idx, rgb, exp); end
  endtask

  initial begin
    int n;
    logic [7:0] lv [6] = '{8'hFF, 8'hCC, 8'h99, 8'h66, 8'h33, 8'h00};
    // spot entries of the printed table
    chk(0,   24'hFFFFFF);
    chk(1,   24'hFFFFCC);
    chk(5,   24'hFFFF00);
    chk(6,   24'hFFCCFF);
    chk(36,  24'hCCFFFF);
    chk(215, 24'h000000);
    chk(250, 24'h000000);
    n = 0;
    for (int r = 0; r < 6; r++)
      for (int g = 0; g < 6; g++)
        for (int b = 0; b < 6; b++) begin
          chk(n, {lv[r], lv[g], lv[b]});
          n++;
        end
    // latency: a new index shows only after the clock edge
    @(negedge clk); index = 8'd0; #1;
    checks++;
    if (rgb !== 24'h000000) begin failures++; $display("output changed before the clock"); end
    @(negedge clk);
    checks++;
    if (rgb !== 24'hFFFFFF) begin failures++; $display("output missing after the clock"); end
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
