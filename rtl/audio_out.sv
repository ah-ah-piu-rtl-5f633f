// audio_out: background music and sound effects to the WM8731 DAC.
//
// Register file: 32 x 16-bit words behind an Avalon-MM slave port (readdata
// registered). Word 0 is the sound-effect command, words 1..31 hold the next
// 31 background-music samples written by software.
//
// Clocks: from the 50 MHz clock DACLRC toggles every LRCK_DIV+1 cycles (4168,
// giving the 6 kHz sample rate). An internal bit clock dac_bclk of period
// BCLK_DIV+1 (261) rises at count BCLK_SET and falls at BCLK_DIV, restarting
// at each DACLRC edge; the divider values are the original design's. DACDAT
// is shifted by the bit clock on bclk_in, which is the codec's BCLK pin: the
// WM8731 has one BCLK for ADC and DAC, and in the top level it is the one
// made by the audio-input block. A stand-alone user ties bclk_in to
// dac_bclk. Using the shared BCLK is own choice (the original shifted DACDAT
// on its own bit clock, which the codec never sees).
//
// Serial data: at every DACLRC edge a 16-bit word is loaded and then shifted
// out most significant bit first on DACDAT (left justified): the codec
// samples on rising BCLK, and the word shifts on each falling BCLK that
// follows a rising one seen after the load, so the first bit is held until
// the codec has taken it. The word loaded as DACLRC rises (left channel) is the
// current music sample; the word loaded as it falls (right channel) is the
// current effect sample while an effect plays, else the music sample again
// (held in music_word, so a refill during the frame cannot change it).
// Mixing the two sources in separate channels follows the original
// description; the fallback to music is own choice.
//
// Music: at each falling DACLRC edge the music pointer steps 1,2..31,1.
// When word 31 has been loaded for sending, request (the interrupt) is
// raised; any bus write clears it, and software refills words 1..31. Word 1
// is next needed one full sample period later. The original raised request
// while the pointer sat at 31; raising it once after the last word has been
// taken is this implementation's choice.
//
// Effects: command 1/3/5 sets the ROM address to the start of effect 1/2/3;
// command 2/4/6 then steps the address once per sample (falling DACLRC)
// until the effect's end address, where it stops and the effect falls
// silent. Command 0 parks the address at 0. rom_addr is registered.
module audio_out
  import ahp_pkg::*;
#(
  parameter int unsigned LRCK_DIV = 4167,
  parameter int unsigned BCLK_DIV = 260,
  parameter int unsigned BCLK_SET = 130
) (
  input  logic              clk,         // 50 MHz
  input  logic              reset_n,
  input  av_req_t           av,
  output logic [15:0]       readdata,
  output logic              request,     // interrupt: music buffer needs data
  output logic [SFX_AW-1:0] rom_addr,
  input  logic [15:0]       rom_data,
  output logic              dac_lrck,
  output logic              dac_dat,
  output logic              dac_bclk,    // internal bit clock
  input  logic              bclk_in      // bit clock the codec uses
);
  logic [15:0] regs [32];
  logic [15:0] lrck_cnt;
  logic [11:0] bclk_cnt;
  logic        set_lrck, set_bclk, clr_bclk, sample_tick;
  logic [4:0]  bgm_ptr;
  logic [SFX_AW-1:0] sfx_addr, sfx_end;
  logic        sfx_play;
  logic [15:0] shift_out;
  logic [15:0] music_word;   // music sample of the current frame
  logic        bclk_q, bclk_rise, bclk_fall, armed;
  logic [15:0] cmd;

  assign cmd         = regs[0];
  assign set_lrck    = (lrck_cnt == 16'(LRCK_DIV));
  assign set_bclk    = (bclk_cnt == 12'(BCLK_SET));
  assign clr_bclk    = (bclk_cnt == 12'(BCLK_DIV));
  assign sample_tick = set_lrck && dac_lrck;          // falling DACLRC

  // ------------------------------------------------ bus registers
  always_ff @(posedge clk) begin
    if (!reset_n) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
      readdata <= '0;
    end else if (av.chipselect) begin
      if (av.read)
        readdata <= regs[av.address[4:0]];
      else if (av.write)
        regs[av.address[4:0]] <= av.writedata;
    end
  end

  // ------------------------------------------------ clocks
  always_ff @(posedge clk) begin
    if (!reset_n) begin
      lrck_cnt <= '0;
      bclk_cnt <= '0;
      dac_lrck <= 1'b0;
      dac_bclk <= 1'b0;
    end else begin
      lrck_cnt <= set_lrck ? '0 : lrck_cnt + 16'd1;
      bclk_cnt <= (set_lrck || clr_bclk) ? '0 : bclk_cnt + 12'd1;
      if (set_lrck) dac_lrck <= ~dac_lrck;
      if (set_lrck || clr_bclk) dac_bclk <= 1'b0;
      else if (set_bclk)        dac_bclk <= 1'b1;
    end
  end

  // ------------------------------------------------ music pointer and interrupt
  always_ff @(posedge clk) begin
    if (!reset_n) begin
      bgm_ptr <= 5'd1;
      request <= 1'b0;
    end else begin
      if (sample_tick) bgm_ptr <= (bgm_ptr == 5'd31) ? 5'd1 : bgm_ptr + 5'd1;
      if (set_lrck && !dac_lrck && bgm_ptr == 5'd31) request <= 1'b1;
      else if (av.chipselect && av.write) request <= 1'b0;
    end
  end

  // ------------------------------------------------ effect sequencer
  always_ff @(posedge clk) begin
    if (!reset_n) begin
      sfx_addr <= '0;
      sfx_end  <= '0;
      sfx_play <= 1'b0;
      rom_addr <= '0;
    end else begin
      unique case (cmd)
        16'd0: begin sfx_addr <= '0; sfx_end <= '0; sfx_play <= 1'b0; end
        16'd1: begin sfx_addr <= SFX1_START; sfx_end <= SFX1_END; sfx_play <= 1'b0; end
        16'd3: begin sfx_addr <= SFX2_START; sfx_end <= SFX2_END; sfx_play <= 1'b0; end
        16'd5: begin sfx_addr <= SFX3_START; sfx_end <= SFX3_END; sfx_play <= 1'b0; end
        16'd2, 16'd4, 16'd6: begin
          sfx_play <= (sfx_addr < sfx_end);
          if (sample_tick && sfx_addr < sfx_end) sfx_addr <= sfx_addr + 1'b1;
        end
        default: sfx_play <= 1'b0;
      endcase
      rom_addr <= sfx_addr;
    end
  end

  // ------------------------------------------------ serialiser
  assign bclk_rise = bclk_in && !bclk_q;
  assign bclk_fall = !bclk_in && bclk_q;

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      shift_out  <= '0;
      music_word <= '0;
      bclk_q     <= 1'b0;
      armed      <= 1'b0;
    end else if (set_lrck) begin
      bclk_q <= bclk_in;
      armed  <= 1'b0;
      if (!dac_lrck) begin                                  // left: music
        shift_out  <= regs[bgm_ptr];
        music_word <= regs[bgm_ptr];
      end
      else if (sfx_play)   shift_out <= rom_data;           // right: effect
      else                 shift_out <= music_word;         // right: same music sample
    end else begin
      bclk_q <= bclk_in;
      if (bclk_rise) armed <= 1'b1;
      if (bclk_fall && armed) shift_out <= {shift_out[14:0], 1'b0};
    end
  end
  assign dac_dat = shift_out[15];
endmodule
