// audio_in_slave: bus side of the audio input.
//
// Keeps the most recent microphone word from audio_in_deser and lets the
// processor read it over an Avalon-MM slave port (any word address; readdata
// is registered, one clock of read latency). Software classifies silence,
// short and long sounds from these values. Only the left-channel word is
// kept (the microphone is mono and feeds both channels; own choice). The
// slave ignores address, write and writedata, which lint reports as unused.
module audio_in_slave
  import ahp_pkg::*;
(
  input  logic        clk,
  input  logic        reset_n,
  input  logic [15:0] sample,
  input  logic        sample_valid,
  input  logic        sample_is_left,
  input  av_req_t     av,
  output logic [15:0] readdata
);
  logic [15:0] latest;
  always_ff @(posedge clk) begin
    if (!reset_n) begin
      latest   <= '0;
      readdata <= '0;
    end else begin
      if (sample_valid && sample_is_left) latest <= sample;
      if (av.chipselect && av.read) readdata <= latest;
    end
  end
endmodule
