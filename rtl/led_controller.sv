// led_controller: score display on four seven-segment digits.
//
// Software writes one decimal digit per register over the Avalon-MM slave
// port: word address 0 is the ones digit (HEX0) up to address 3 for the
// thousands (HEX3). Each register drives a seg7_decoder. Reads return the
// register one clock after the request (readdata is registered). Registers
// clear to 0 at reset (an own choice; the original had no reset value), so
// the display shows 0000 until software writes.
module led_controller
  import ahp_pkg::*;
(
  input  logic        clk,
  input  logic        reset_n,
  input  av_req_t     av,
  output logic [15:0] readdata,
  output logic [6:0]  hex0,
  output logic [6:0]  hex1,
  output logic [6:0]  hex2,
  output logic [6:0]  hex3
);
  logic [3:0][15:0] digits;

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      digits   <= '0;
      readdata <= '0;
    end else if (av.chipselect) begin
      if (av.read)
        readdata <= digits[av.address[1:0]];
      else if (av.write)
        digits[av.address[1:0]] <= av.writedata;
    end
  end

  seg7_decoder u_d0 (.digit(digits[0][3:0]), .seg_n(hex0));
  seg7_decoder u_d1 (.digit(digits[1][3:0]), .seg_n(hex1));
  seg7_decoder u_d2 (.digit(digits[2][3:0]), .seg_n(hex2));
  seg7_decoder u_d3 (.digit(digits[3][3:0]), .seg_n(hex3));
endmodule
