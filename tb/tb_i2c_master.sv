// tb_i2c_master: sends transactions to a behavioural slave and checks the
// bytes it received, the acknowledge result, the bus idle level, the SCL
// period (4 x DIV clocks) and the transaction length (START + 27 bit times
// + STOP); a slave that does not acknowledge must raise ack_error.
module tb_i2c_master;
  logic clk = 0, reset_n = 0;
  logic start, busy, done, ack_error, scl, sda_oe, sda_in;
  logic pull_a, pull_b, sel_b;
  int checks = 0, failures = 0;
  localparam int DIV = 10;
  always #5 clk = ~clk;

  assign sda_in = !(sda_oe || (sel_b ? pull_b : pull_a));
  logic [23:0] data;
  i2c_master #(.DIV(DIV)) dut (.*);
  i2c_slave_model #(.ADDR(7'h1A), .NACK_FIRST(0)) slave_a (.scl, .sda(sda_in), .sda_pull(pull_a));
  i2c_slave_model #(.ADDR(7'h1A), .NACK_FIRST(99)) slave_b (.scl, .sda(sda_in), .sda_pull(pull_b));

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0h expected %0h", what, got, exp); end
  endtask

  int t_rise [$];
  always @(posedge scl) t_rise.push_back($time);

  task automatic send(input logic [23:0] d, output int cycles);
    int c = 0;
    @(negedge clk); data = d; start = 1;
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); c++; end
    cycles = c;
  endtask

  initial begin
    int cyc;
    start = 0; data = '0; sel_b = 0;
    repeat (3) @(negedge clk); reset_n = 1;
    chk(int'(scl), 1, "idle scl");
    chk(int'(sda_in), 1, "idle sda");
    for (int t = 0; t < 5; t++) begin
      logic [15:0] w;
      w = 16'($urandom);
      t_rise.delete();
      send({8'h34, w}, cyc);
      chk(int'(ack_error), 0, "ack ok");
      chk(slave_a.count, t + 1, "words received");
      chk(int'(slave_a.words[t]), int'(w), "word value");
      chk(t_rise.size(), 28, "scl rising edges (27 bits + stop)");
      if (t_rise.size() > 2) chk(int'(t_rise[2] - t_rise[1]), 4 * DIV * 10, "scl period");
      chk(cyc, (1 + 27 + 1) * 4 * DIV, "transaction cycles");
    end
    // wrong address: no acknowledge
    send({8'h36, 16'h1234}, cyc);
    chk(int'(ack_error), 1, "nack on foreign address");
    // slave that never acknowledges
    sel_b = 1;
    send({8'h34, 16'hABCD}, cyc);
    chk(int'(ack_error), 1, "nack from silent slave");
    chk(int'(scl), 1, "scl idle after stop");
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
