// codec_adc_model: behavioural model of the WM8731 ADC serial output in
// slave mode, left-justified 16-bit format. At every ADCLRC edge it takes the
// next word of its queue (left for ADCLRC high, right for low) and presents
// it most significant bit first, the first bit right away and each next bit
// after a falling BCLK. prev holds the word of the half frame that just
// ended, for checking.
module codec_adc_model (
  input  logic adclrc,
  input  logic bclk,
  output logic adcdat
);
  logic [15:0] next_word = 16'h0000;
  logic [15:0] cur = 16'h0000;
  logic [15:0] prev = 16'h0000;     // word of the half frame that just ended
  time t_edge = 0;
  int bitn;
  initial adcdat = 1'b0;

  always @(adclrc) begin
    prev = cur;
    t_edge = $time;
    cur = next_word;
    next_word = next_word * 16'd7919 + 16'd12345;   // fresh word each half frame
    bitn = 15;
    adcdat = cur[15];
  end
  always @(negedge bclk) begin
    // a BCLK fall at the very ADCLRC edge belongs to the previous word
    if (bitn > 0 && $time != t_edge) begin
      bitn--;
      adcdat = cur[bitn];
    end
  end
endmodule
