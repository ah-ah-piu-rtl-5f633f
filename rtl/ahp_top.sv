// ahp_top: FPGA side of the Ah-Ah-Piu voice-controlled game.
//
// The game software runs on a soft processor outside this module; it reaches
// the hardware through one Avalon-MM master port (m_*), which avalon_decoder
// routes to four slaves:
//   0  vga_raster      sprite positions, frames, background mode, score digits
//   1  audio_out       sound-effect command and 31-word music buffer (irq_audio
//                      asks for the next 31 music samples)
//   2  audio_in_slave  latest microphone sample
//   3  led_controller  score on HEX3..HEX0
// The VGA controller reads background images from the external SRAM (read
// only here; the images are loaded beforehand). The WM8731 codec is
// configured over I2C by codec_config after reset, takes AUD_XCK = 25 MHz,
// delivers microphone bits on ADCDAT (audio_in_deser makes ADCLRC and BCLK)
// and receives music and effects on DACLRC/DACDAT from audio_out, whose
// effect samples come from sfx_rom. The codec has a single BCLK, so audio_out
// shifts DACDAT with the BCLK made by the audio-input block.
//
// One 50 MHz clock drives everything; the 25 MHz pixel and audio reference
// rates are clock enables, and AUD_XCK is a divided-by-two register. The
// open-drain I2C data line is split into i2c_sda_oe (pull low) and
// i2c_sda_in. Blocks and their connections follow the original architecture;
// the single clock domain and the bus address map are own choices.
// codec_config's retry counter is kept for debugging and not brought out.
module ahp_top
  import ahp_pkg::*;
(
  input  logic        clk50,
  input  logic        reset_n,
  // processor bus
  input  logic [7:0]  m_address,
  input  logic        m_read,
  input  logic        m_write,
  input  logic [15:0] m_writedata,
  output logic [15:0] m_readdata,
  output logic        m_readdatavalid,
  output logic        irq_audio,
  // SRAM (background images)
  output logic [17:0] sram_addr,
  input  logic [15:0] sram_dq,
  // VGA
  output logic        vga_clk,
  output logic        vga_hs,
  output logic        vga_vs,
  output logic        vga_blank_n,
  output logic        vga_sync_n,
  output logic [9:0]  vga_r,
  output logic [9:0]  vga_g,
  output logic [9:0]  vga_b,
  // seven-segment score
  output logic [6:0]  hex0,
  output logic [6:0]  hex1,
  output logic [6:0]  hex2,
  output logic [6:0]  hex3,
  // WM8731 codec
  output logic        aud_xck,
  output logic        aud_bclk,
  output logic        aud_adclrck,
  input  logic        aud_adcdat,
  output logic        aud_daclrck,
  output logic        aud_dacdat,
  output logic        i2c_sclk,
  output logic        i2c_sda_oe,
  input  logic        i2c_sda_in,
  output logic        codec_ready
);
  // ------------------------------------------------ 25 MHz reference
  logic ce25;
  always_ff @(posedge clk50)
    if (!reset_n) ce25 <= 1'b0;
    else          ce25 <= ~ce25;
  assign aud_xck = ce25;

  // ------------------------------------------------ bus
  av_req_t [3:0]    s_req;
  logic [3:0][15:0] s_readdata;
  avalon_decoder u_bus (.clk(clk50), .reset_n, .m_address, .m_read, .m_write,
                        .m_writedata, .m_readdata, .m_readdatavalid,
                        .s_req, .s_readdata);

  // ------------------------------------------------ video
  vga_raster u_vga (.clk(clk50), .reset_n, .av(s_req[SLV_VGA]), .readdata(s_readdata[SLV_VGA]),
                    .sram_addr, .sram_data(sram_dq), .vga_clk, .vga_hs_n(vga_hs),
                    .vga_vs_n(vga_vs), .vga_blank_n, .vga_sync_n, .vga_r, .vga_g, .vga_b);

  led_controller u_led (.clk(clk50), .reset_n, .av(s_req[SLV_LED]),
                        .readdata(s_readdata[SLV_LED]), .hex0, .hex1, .hex2, .hex3);

  // ------------------------------------------------ audio in
  logic [15:0] mic_sample;
  logic        mic_valid, mic_left;
  audio_in_deser u_ain (.clk(clk50), .reset_n, .ce(ce25), .data_out(mic_sample),
                        .audio_req(mic_valid), .is_left(mic_left), .adc_lrck(aud_adclrck),
                        .bclk(aud_bclk), .adc_dat(aud_adcdat));
  audio_in_slave u_ain_bus (.clk(clk50), .reset_n, .sample(mic_sample), .sample_valid(mic_valid),
                            .sample_is_left(mic_left), .av(s_req[SLV_AUDIO_IN]),
                            .readdata(s_readdata[SLV_AUDIO_IN]));

  // ------------------------------------------------ audio out
  logic [SFX_AW-1:0] rom_addr;
  logic [15:0]       rom_data;
  logic              dac_bclk_unused;
  audio_out u_aout (.clk(clk50), .reset_n, .av(s_req[SLV_AUDIO_OUT]),
                    .readdata(s_readdata[SLV_AUDIO_OUT]), .request(irq_audio),
                    .rom_addr, .rom_data, .dac_lrck(aud_daclrck), .dac_dat(aud_dacdat),
                    .dac_bclk(dac_bclk_unused), .bclk_in(aud_bclk));
  sfx_rom u_rom (.clk(clk50), .addr(rom_addr), .q(rom_data));

  // ------------------------------------------------ codec set-up
  logic [7:0] cfg_retries;
  codec_config u_cfg (.clk(clk50), .reset_n, .ready(codec_ready), .scl(i2c_sclk),
                      .sda_oe(i2c_sda_oe), .sda_in(i2c_sda_in), .retries(cfg_retries));
endmodule
