// codec_config: programs the WM8731 after reset.
//
// The codec has 11 control registers of 9 bits, each written as one 16-bit
// word (7-bit register address, 9-bit value) over I2C to the codec's bus
// address 0x34. After reset this block sends the words of
// ahp_pkg::codec_word in order: a reset (R15), then R0..R9 (line-in and
// headphone volume, analogue path with the microphone selected and unmuted,
// digital path, power, left-justified 16-bit slave interface, 8 kHz, active).
// A word that is not acknowledged is sent again. ready goes high when all 11
// words have been accepted. The register layout follows the original design's map;
// the values and the retry are this implementation's choices.
module codec_config
  import ahp_pkg::*;
#(
  parameter int unsigned I2C_DIV = 125
) (
  input  logic clk,
  input  logic reset_n,
  output logic ready,
  output logic scl,
  output logic sda_oe,
  input  logic sda_in,
  output logic [7:0] retries
);
  logic [3:0]  idx;
  logic        start, busy, done, ack_error, waiting;

  i2c_master #(.DIV(I2C_DIV)) u_i2c (
    .clk, .reset_n, .start, .data({WM8731_I2C_ADDR, 1'b0, codec_word(int'(idx))}),
    .busy, .done, .ack_error, .scl, .sda_oe, .sda_in);

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      idx     <= '0;
      start   <= 1'b0;
      waiting <= 1'b0;
      ready   <= 1'b0;
      retries <= '0;
    end else begin
      start <= 1'b0;
      if (!ready && !waiting && !busy && !start) begin
        start   <= 1'b1;
        waiting <= 1'b1;
      end else if (waiting && done) begin
        waiting <= 1'b0;
        if (ack_error) retries <= retries + 8'd1;
        else if (idx == 4'(CODEC_NWORDS - 1)) ready <= 1'b1;
        else idx <= idx + 4'd1;
      end
    end
  end
endmodule
