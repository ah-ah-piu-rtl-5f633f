// tb_codec_config: the codec set-up sequence must deliver eleven words to
// the slave at address 0x34, in order, resending the first word which the
// slave refuses once, and then raise ready.
module tb_codec_config;
  logic clk = 0, reset_n = 0;
  logic ready, scl, sda_oe, sda_in, pull;
  logic [7:0] retries;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  assign sda_in = !(sda_oe || pull);
  codec_config #(.I2C_DIV(8)) dut (.*);
  i2c_slave_model #(.ADDR(7'h1A), .NACK_FIRST(1)) codec (.scl, .sda(sda_in), .sda_pull(pull));

  // expected {register, value}: reset, R0..R9
  logic [15:0] expw [11] = '{
    {7'd15, 9'h000}, {7'd0, 9'h017}, {7'd1, 9'h017}, {7'd2, 9'h079}, {7'd3, 9'h079},
    {7'd4, 9'h011}, {7'd5, 9'h000}, {7'd6, 9'h000}, {7'd7, 9'h001}, {7'd8, 9'h00C},
    {7'd9, 9'h001}};

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0h expected %0h", what, got, exp); end
  endtask

  initial begin
    repeat (3) @(negedge clk); reset_n = 1;
    wait (ready);
    repeat (100) @(negedge clk);
    chk(codec.count, 11, "words delivered");
    for (int i = 0; i < 11; i++) chk(int'(codec.words[i]), int'(expw[i]), $sformatf("word %0d", i));
    chk(int'(retries), 1, "retries after one refusal");
    chk(codec.bad_addr, 0, "foreign addresses");
    chk(int'(ready), 1, "ready stays high");
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
