// i2c_slave_model: behavioural I2C write-only slave for testbenches.
//
// Watches SCL and the open-drain SDA line, detects START and STOP, shifts
// in bytes on rising SCL, and pulls SDA low for the acknowledge clock after
// each byte when the address matches (ADDR, 7 bits). The first NACK_FIRST
// transactions are not acknowledged. Each completed transaction of an
// address byte and two data bytes is logged as a 16-bit word in words[],
// with count holding how many arrived; bad_addr counts foreign addresses.
module i2c_slave_model #(
  parameter logic [6:0] ADDR = 7'h1A,
  parameter int NACK_FIRST = 0
) (
  input  logic scl,
  input  logic sda,          // resolved bus level
  output logic sda_pull      // 1 = slave pulls SDA low
);
  logic [15:0] words [64];
  int count = 0;
  int bad_addr = 0;
  int started = 0;
  int nbits, nbytes;
  logic [7:0] sh;
  logic [23:0] trans;
  bit active = 0, ack_phase = 0, nack_this = 0;

  initial sda_pull = 1'b0;

  // START / STOP: SDA changes while SCL is high
  always @(negedge sda) if (scl) begin
    active = 1; nbits = 0; nbytes = 0; trans = '0; ack_phase = 0;
    nack_this = (started < NACK_FIRST);
    started++;
  end
  always @(posedge sda) if (scl && active) begin
    active = 0;
    if (nbytes == 3 && !nack_this) begin
      if (count < 64) words[count] = trans[15:0];
      count++;
    end
  end

  always @(posedge scl) if (active && !ack_phase) begin
    sh = {sh[6:0], sda};
    nbits++;
  end

  always @(negedge scl) if (active) begin
    if (ack_phase) begin
      sda_pull <= 1'b0;
      ack_phase = 0;
    end else if (nbits == 8) begin
      nbits = 0;
      trans = {trans[15:0], sh};
      nbytes++;
      ack_phase = 1;
      if (nbytes == 1 && sh[7:1] != ADDR) bad_addr++;
      sda_pull <= !nack_this && !(nbytes == 1 && sh[7:1] != ADDR);
    end
  end
endmodule
