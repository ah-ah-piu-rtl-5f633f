// tb_audio_in_deser: the ADC model sends a known word in every half frame;
// each word must come out on data_out at the next ADCLRC edge with one
// audio_req pulse, tagged with its channel. At the default dividers ADCLRC
// must have a period of 2 x 1563 reference cycles (3126 x 2 clocks, 8 kHz
// from 25 MHz) and each half frame must carry 16 BCLK pulses.
module tb_audio_in_deser;
  logic clk = 0, reset_n = 0, ce = 0;
  logic [15:0] data_out;
  logic audio_req, is_left, adc_lrck, bclk, adc_dat;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  always @(posedge clk) ce <= ~ce;
  audio_in_deser dut (.*);
  codec_adc_model adc (.adclrc(adc_lrck), .bclk, .adcdat(adc_dat));

  int nb = 0;
  always @(posedge bclk) nb++;

  initial begin
    int n = 0, t_prev = -1, t_now;
    repeat (4) @(posedge clk); reset_n = 1;
    // skip the first half frame (word started before reset released)
    @(posedge audio_req);
    @(posedge clk);
    nb = 0;
    while (n < 40) begin
      @(posedge clk);
      if (audio_req) begin
        n++;
        t_now = int'($time / 10);
        checks++;
        // the word just delivered is the one the model sent in the half frame that ended
        if (data_out !== adc.prev) begin
          failures++; $display("word %0d: got %h expected %h", n, data_out, adc.prev);
        end
        checks++;
        if (is_left !== !adc_lrck) begin failures++; $display("word %0d: channel flag", n); end
        checks++;
        if (nb != 16) begin failures++; $display("word %0d: %0d bclk pulses", n, nb); end
        nb = 0;
        if (t_prev >= 0) begin
          checks++;
          if (t_now - t_prev != 2 * 1563) begin
            failures++; $display("half frame %0d clocks", t_now - t_prev);
          end
        end
        t_prev = t_now;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
