// i2c_master: writes one three-byte I2C transaction (the codec's control bus).
//
// A start pulse sends START, the 24 bits of data (slave address with the R/W
// bit, then two data bytes; most significant bit first), checking the
// slave's acknowledge after each byte, then STOP. Each bit takes four
// quarter periods of DIV clocks: SDA changes while SCL is low, SCL is high
// for the middle two quarters, and the acknowledge is sampled in the middle
// of the high time. SDA is open drain: sda_oe high pulls the line low,
// otherwise it floats high. done pulses for one clock at the end; ack_error
// holds whether any of the three acknowledges was missing. With DIV = 125 and
// a 50 MHz clock SCL runs at 100 kHz, the standard-mode rate. The original design
// gives the protocol (start, bytes with acknowledge, stop); the state machine
// and its timing are this implementation's.
module i2c_master #(
  parameter int unsigned DIV = 125
) (
  input  logic        clk,
  input  logic        reset_n,
  input  logic        start,
  input  logic [23:0] data,
  output logic        busy,
  output logic        done,
  output logic        ack_error,
  output logic        scl,
  output logic        sda_oe,
  input  logic        sda_in
);
  typedef enum logic [2:0] {S_IDLE, S_START, S_BIT, S_ACK, S_STOP} state_e;
  state_e      state;
  logic [$clog2(DIV+1)-1:0] div_cnt;
  logic        tick;
  logic [1:0]  q;             // quarter within the bit
  logic [4:0]  bitcnt;
  logic [23:0] sh;
  logic        sda_r;         // 1 = released (high)

  assign tick   = (div_cnt == '0);
  assign busy   = (state != S_IDLE);
  assign sda_oe = ~sda_r;

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      state     <= S_IDLE;
      div_cnt   <= '0;
      q         <= '0;
      bitcnt    <= '0;
      sh        <= '0;
      scl       <= 1'b1;
      sda_r     <= 1'b1;
      done      <= 1'b0;
      ack_error <= 1'b0;
    end else begin
      done <= 1'b0;
      if (state == S_IDLE) begin
        div_cnt <= '0;
        q       <= '0;
        scl     <= 1'b1;
        sda_r   <= 1'b1;
        if (start) begin
          state     <= S_START;
          sh        <= data;
          bitcnt    <= 5'd23;
          ack_error <= 1'b0;
          div_cnt   <= ($clog2(DIV+1))'(DIV - 1);
        end
      end else begin
        div_cnt <= tick ? ($clog2(DIV+1))'(DIV - 1) : div_cnt - 1'b1;
        if (tick) begin
          q <= q + 2'd1;
          unique case (state)
            S_START: begin                       // SDA falls while SCL high
              unique case (q)
                2'd0: begin scl <= 1'b1; sda_r <= 1'b1; end
                2'd1: sda_r <= 1'b0;
                2'd2: scl <= 1'b0;
                2'd3: state <= S_BIT;
              endcase
            end
            S_BIT: begin
              unique case (q)
                2'd0: begin scl <= 1'b0; sda_r <= sh[23]; end
                2'd1: scl <= 1'b1;
                2'd2: ;
                2'd3: begin
                  scl <= 1'b0;
                  sh  <= {sh[22:0], 1'b0};
                  if (bitcnt[2:0] == 3'd0) state <= S_ACK;
                  else                     bitcnt <= bitcnt - 5'd1;
                end
              endcase
            end
            S_ACK: begin
              unique case (q)
                2'd0: begin scl <= 1'b0; sda_r <= 1'b1; end
                2'd1: scl <= 1'b1;
                2'd2: if (sda_in) ack_error <= 1'b1;
                2'd3: begin
                  scl <= 1'b0;
                  if (bitcnt == 5'd0) state <= S_STOP;
                  else begin
                    bitcnt <= bitcnt - 5'd1;
                    state  <= S_BIT;
                  end
                end
              endcase
            end
            S_STOP: begin                        // SDA rises while SCL high
              unique case (q)
                2'd0: begin scl <= 1'b0; sda_r <= 1'b0; end
                2'd1: scl <= 1'b1;
                2'd2: sda_r <= 1'b1;
                2'd3: begin state <= S_IDLE; done <= 1'b1; end
              endcase
            end
            default: state <= S_IDLE;
          endcase
        end
      end
    end
  end
endmodule
