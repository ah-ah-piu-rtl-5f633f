// tb_audio_in_slave: software must read the latest left-channel sample;
// right-channel words are ignored and reads have one clock latency.
module tb_audio_in_slave;
  import ahp_pkg::*;
  logic clk = 0, reset_n = 0;
  logic [15:0] sample, readdata;
  logic sample_valid, sample_is_left;
  av_req_t av;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  audio_in_slave dut (.*);

  initial begin
    logic [15:0] last = 0;
    av = '0; sample = 0; sample_valid = 0; sample_is_left = 0;
    repeat (3) @(negedge clk); reset_n = 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      sample = 16'($urandom); sample_is_left = $urandom_range(0, 1); sample_valid = 1;
      if (sample_is_left) last = sample;
      @(negedge clk); sample_valid = 0; sample = 16'($urandom);
      av = '{chipselect:1, read:1, write:0, address:0, writedata:0};
      @(negedge clk); av = '0;
      checks++;
      if (readdata !== last) begin failures++; $display("read %h expected %h", readdata, last); end
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
