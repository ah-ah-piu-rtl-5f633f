// audio_in_deser: microphone samples from the WM8731 ADC.
//
// The codec runs as a clock slave, so this block makes its ADC clocks from a
// 25 MHz reference (a clock enable, ce, in the 50 MHz domain): ADCLRC toggles
// every LRCK_DIV+1 reference cycles (1563, giving 8 kHz frames) and within
// each half frame BCLK has a period of BCLK_DIV+1 cycles (99), rising at count
// BCLK_SET; both dividers restart on every ADCLRC edge. The divider values
// are those of the original design. ADCDAT, which the codec changes after
// BCLK falls, is sampled as BCLK rises, most significant bit first (left
// justified); 16 bits fill each half frame. The bit position restarts at
// every ADCLRC edge, which keeps the word aligned (own choice). At each
// ADCLRC edge the finished 16-bit two's-complement word appears on data_out
// with a one-clock pulse on audio_req; is_left tells which channel it was
// (ADCLRC high = left).
module audio_in_deser #(
  parameter int unsigned LRCK_DIV = 1562,
  parameter int unsigned BCLK_DIV = 98,
  parameter int unsigned BCLK_SET = 49
) (
  input  logic        clk,
  input  logic        reset_n,
  input  logic        ce,          // 25 MHz reference clock enable
  output logic [15:0] data_out,
  output logic        audio_req,
  output logic        is_left,
  output logic        adc_lrck,
  output logic        bclk,
  input  logic        adc_dat
);
  logic [11:0] lrck_cnt;
  logic [7:0]  bclk_cnt;
  logic [3:0]  bitpos;
  logic [15:0] shift;
  logic        set_lrck, set_bclk, clr_bclk;

  assign set_lrck = ce && (lrck_cnt == 12'(LRCK_DIV));
  assign set_bclk = ce && (bclk_cnt == 8'(BCLK_SET));
  assign clr_bclk = ce && (bclk_cnt == 8'(BCLK_DIV));

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      lrck_cnt  <= '0;
      bclk_cnt  <= '0;
      adc_lrck  <= 1'b0;
      bclk      <= 1'b0;
      bitpos    <= 4'd15;
      shift     <= '0;
      data_out  <= '0;
      audio_req <= 1'b0;
      is_left   <= 1'b0;
    end else begin
      audio_req <= 1'b0;
      if (ce) begin
        lrck_cnt <= set_lrck ? '0 : lrck_cnt + 12'd1;
        bclk_cnt <= (set_lrck || clr_bclk) ? '0 : bclk_cnt + 8'd1;
      end
      if (set_lrck) begin
        adc_lrck  <= ~adc_lrck;
        bclk      <= 1'b0;
        bitpos    <= 4'd15;
        data_out  <= shift;
        is_left   <= adc_lrck;
        audio_req <= 1'b1;
      end else if (clr_bclk) begin
        bclk <= 1'b0;
      end else if (set_bclk) begin
        bclk          <= 1'b1;
        shift[bitpos] <= adc_dat;
        bitpos        <= bitpos - 4'd1;
      end
    end
  end
endmodule
