// tb_ahp_top: end-to-end test of the whole FPGA design at full size
// (default parameters everywhere, real 50 MHz timing).
//
// Around the top level sit: a processor model driving the Avalon-MM master
// port (with a semaphore so the interrupt handler and the main program share
// the bus), an interrupt handler that refills the 31 music words whenever
// irq_audio rises, an SRAM model whose word is a function of its address, the
// codec's I2C slave, the codec's ADC output model, and a decoder that reads
// DACDAT on rising codec BCLK, the first 16 bits after each DACLRC edge, as
// the WM8731 does in left-justified mode.
//
// Each mechanism is counted and reported; one that never happens counts as
// a failure:
//   codec_config  the eleven set-up words reach the codec in order, ready rises
//   bus_readback  register writes read back through the address decoder
//   led           score digits written to the LED slave appear on HEX3..HEX0
//   mic           bus reads of the microphone slave return a recent left sample
//   irq_refill    interrupts handled, each clearing the request
//   music         left DAC words continue the music sequence across refills
//   effect        right DAC words equal the effect ROM from effect 2's start
//   vga_sprite    the player's pixel colour at a probe point, frame 1
//   vga_frame     the same probe after switching the player to frame 0
//   vga_bg        a background probe in game mode and after switching to menu
//   vga_timing    frame period 840,000 clocks (800 x 525 pixels at 25 MHz)
module tb_ahp_top;
  import ahp_pkg::*;
  logic clk50 = 0, reset_n = 0;
  logic [7:0]  m_address;
  logic        m_read, m_write;
  logic [15:0] m_writedata, m_readdata;
  logic        m_readdatavalid, irq_audio;
  logic [17:0] sram_addr;
  logic [15:0] sram_dq;
  logic        vga_clk, vga_hs, vga_vs, vga_blank_n, vga_sync_n;
  logic [9:0]  vga_r, vga_g, vga_b;
  logic [6:0]  hex0, hex1, hex2, hex3;
  logic        aud_xck, aud_bclk, aud_adclrck, aud_adcdat, aud_daclrck, aud_dacdat;
  logic        i2c_sclk, i2c_sda_oe, i2c_sda_in, codec_ready, sda_pull;
  int checks = 0, failures = 0;
  always #10 clk50 = ~clk50;

  ahp_top dut (.*);

  // ------------------------------------------------ board models
  function automatic logic [15:0] sram_word(input int a);
    return {8'(a * 7 + 3), 8'(a * 13 + (a >> 8))};
  endfunction
  assign sram_dq = sram_word(int'(sram_addr));

  assign i2c_sda_in = !(i2c_sda_oe || sda_pull);
  i2c_slave_model #(.ADDR(7'h1A)) codec_i2c (.scl(i2c_sclk), .sda(i2c_sda_in), .sda_pull);
  codec_adc_model codec_adc (.adclrc(aud_adclrck), .bclk(aud_bclk), .adcdat(aud_adcdat));

  // ------------------------------------------------ counters
  int n_cfg = 0, n_bus = 0, n_led = 0, n_mic = 0, n_irq = 0, n_music = 0, n_effect = 0;
  int n_vga_sprite = 0, n_vga_frame = 0, n_vga_bg = 0, n_vga_timing = 0;

  function automatic bit chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("%s: got %0h expected %0h", what, got, exp);
      return 0;
    end
    return 1;
  endfunction

  // ------------------------------------------------ processor bus model
  semaphore bus = new(1);
  task automatic bus_wr(input int slave, input int a, input int d);
    bus.get(1);
    @(negedge clk50);
    m_address = {2'(slave), 6'(a)}; m_write = 1; m_writedata = 16'(d);
    @(negedge clk50);
    m_write = 0;
    bus.put(1);
  endtask
  task automatic bus_rd(input int slave, input int a, output int d);
    bus.get(1);
    @(negedge clk50);
    m_address = {2'(slave), 6'(a)}; m_read = 1;
    @(negedge clk50);
    m_read = 0;
    while (!m_readdatavalid) @(negedge clk50);
    d = int'(m_readdata);
    bus.put(1);
  endtask

  // ------------------------------------------------ interrupt handler: music
  int music = 0;
  task automatic refill();
    for (int i = 1; i <= 31; i++) begin bus_wr(1, i, music); music++; end
  endtask
  bit irq_on = 0;
  always @(posedge clk50) if (irq_on && irq_audio) begin
    refill();
    if (chk(int'(irq_audio), 0, "request cleared")) n_irq++;
  end

  // ------------------------------------------------ DAC decoder (codec view)
  logic [15:0] dw;
  int dn = 0;
  logic pb = 0, pl = 0;
  int left_q [$], right_q [$];
  always @(posedge clk50) begin
    if (aud_daclrck != pl) begin
      if (dn == 16) begin
        if (pl) left_q.push_back(int'(dw));
        else    right_q.push_back(int'(dw));
      end
      dn = 0;
    end
    if (aud_bclk && !pb && dn < 16) begin dw = {dw[14:0], aud_dacdat}; dn++; end
    pb = aud_bclk;
    pl = aud_daclrck;
  end

  // ------------------------------------------------ ADC history (left words)
  int mic_hist [$];
  always @(aud_adclrck) if (!aud_adclrck) begin
    #1 mic_hist.push_back(int'(codec_adc.prev));   // after the model has updated prev
  end

  // ------------------------------------------------ VGA probes
  int ax = 0, ay = 0, frames = 0;
  bit prev_blank = 0;
  int probe_x [2] = '{350, 300};   // player centre, menu area
  int probe_y [2] = '{240, 380};
  logic [7:0] probe_idx [2];
  bit probe_seen [2];
  always @(posedge vga_clk) begin
    if (vga_blank_n) begin
      for (int p = 0; p < 2; p++)
        if (ax == probe_x[p] && ay == probe_y[p]) begin
          logic [23:0] c;
          probe_seen[p] = 1;
          probe_idx[p] = 8'hFF;
          for (int k = 0; k < 256; k++) begin
            c = palette_rgb(8'(k));
            if ({vga_r, vga_g, vga_b} == {c[23:16], 2'b00, c[15:8], 2'b00, c[7:0], 2'b00}) begin
              probe_idx[p] = 8'(k); break;
            end
          end
        end
      ax++;
    end
    if (prev_blank && !vga_blank_n) begin ay++; ax = 0; end
    prev_blank = vga_blank_n;
  end
  time t_vs = 0;
  always @(negedge vga_vs) begin
    if (t_vs != 0 && chk(int'(($time - t_vs) / 20), 840000, "frame period")) n_vga_timing++;
    t_vs = $time;
    ay = 0; ax = 0; frames++;
  end
  task automatic vga_frame();   // captures one complete frame
    @(negedge vga_vs);
    probe_seen = '{0, 0};
    @(negedge vga_vs);
  endtask
  function automatic logic [7:0] bg_probe(input int a, input int x);
    logic [15:0] w = sram_word(a);
    return x[0] ? w[7:0] : w[15:8];
  endfunction

  // ------------------------------------------------ main program
  localparam logic [6:0] SEG [10] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19,
                                     7'h12, 7'h02, 7'h78, 7'h00, 7'h10};
  logic [15:0] expw [11] = '{
    {7'd15, 9'h000}, {7'd0, 9'h017}, {7'd1, 9'h017}, {7'd2, 9'h079}, {7'd3, 9'h079},
    {7'd4, 9'h011}, {7'd5, 9'h000}, {7'd6, 9'h000}, {7'd7, 9'h001}, {7'd8, 9'h00C},
    {7'd9, 9'h001}};

  initial begin
    int d, rw;
    m_address = '0; m_read = 0; m_write = 0; m_writedata = '0;
    repeat (5) @(negedge clk50); reset_n = 1;
    // music buffer first, then interrupts on
    refill();
    irq_on = 1;
    // score on the LEDs
    bus_wr(3, 3, 1); bus_wr(3, 2, 9); bus_wr(3, 1, 8); bus_wr(3, 0, 5);
    repeat (2) @(negedge clk50);
    if (chk(int'({hex3, hex2, hex1, hex0}), int'({SEG[1], SEG[9], SEG[8], SEG[5]}), "HEX3..0")) n_led++;
    for (int i = 0; i < 4; i++) begin
      bus_rd(3, i, d);
      if (chk(d, (i == 0) ? 5 : (i == 1) ? 8 : (i == 2) ? 9 : 1, "LED readback")) n_bus++;
    end
    // game scene: player at (320,210) in frame 1, background mode 0
    bus_wr(0, 2, 320); bus_wr(0, 13, 210); bus_wr(0, 31, 1); bus_wr(0, 19, 0);
    bus_rd(0, 2, d);  if (chk(d, 320, "VGA readback X")) n_bus++;
    bus_rd(0, 13, d); if (chk(d, 210, "VGA readback Y")) n_bus++;
    bus_rd(0, 31, d); if (chk(d, 1, "VGA readback face")) n_bus++;
    // codec set-up over I2C
    while (!codec_ready) @(negedge clk50);
    repeat (100) @(negedge clk50);
    if (chk(codec_i2c.count, 11, "codec words") & chk(codec_i2c.bad_addr, 0, "codec address")) begin
      int ok;
      ok = 1;
      for (int i = 0; i < 11; i++) ok &= chk(int'(codec_i2c.words[i]), int'(expw[i]), "codec word");
      if (ok) n_cfg++;
    end
    // microphone samples
    for (int k = 0; k < 6; k++) begin
      bit found;
      found = 0;
      repeat (3000) @(negedge clk50);
      bus_rd(2, 0, d);
      for (int j = mic_hist.size() - 1; j >= 0 && j >= mic_hist.size() - 2; j--)
        if (mic_hist[j] == d) found = 1;
      if (chk(int'(found), 1, "mic sample is a recent left word")) n_mic++;
    end
    // VGA: player frame 1 and game background at the second probe
    vga_frame();
    if (chk(int'(probe_seen[0]) + int'(probe_seen[1]), 2, "probes seen")) begin
      if (chk(probe_idx[0], sprite_placeholder(30, 30, 60, 60, 1, 40), "player frame 1")) n_vga_sprite++;
      if (chk(probe_idx[1], bg_probe(380 * 320 + 150, 300), "game background")) n_vga_bg++;
    end
    // switch the player to frame 0 and the background to the menu
    bus_wr(0, 31, 0); bus_wr(0, 19, 1);
    vga_frame();
    if (chk(probe_idx[0], sprite_placeholder(30, 30, 60, 60, 0, 40), "player frame 0")) n_vga_frame++;
    chk(int'(probe_idx[0] != sprite_placeholder(30, 30, 60, 60, 1, 40)), 1, "frame changed the colour");
    if (chk(probe_idx[1], bg_probe(153600 + 50 * 150 + 75, 300), "menu background")) n_vga_bg++;
    // sound effect 2
    bus_wr(1, 0, 3);
    repeat (20000) @(negedge clk50);
    rw = right_q.size();
    bus_wr(1, 0, 4);
    while (right_q.size() < rw + 40) @(negedge clk50);
    begin
      int first;
      first = -1;
      for (int i = rw; i < rw + 5; i++)
        if (right_q[i] == int'(dut.u_rom.mem[6314])) begin first = i; break; end
      if (chk(int'(first >= 0), 1, "effect 2 starts")) begin
        for (int i = 0; i < 30; i++)
          if (chk(right_q[first + i], int'(dut.u_rom.mem[6314 + i]), "effect word")) n_effect++;
      end
    end
    bus_wr(1, 0, 0);
    // music: at least three refills, left words continuous
    while (n_irq < 3) @(negedge clk50);
    for (int i = 1; i < left_q.size(); i++)
      if (chk(left_q[i], left_q[i - 1] + 1, "music sequence")) n_music++;
    chk(left_q[1], 1, "music from the first word");

    $display("mechanisms: codec_config=%0d bus_readback=%0d led=%0d mic=%0d irq_refill=%0d",
             n_cfg, n_bus, n_led, n_mic, n_irq);
    $display("mechanisms: music=%0d effect=%0d vga_sprite=%0d vga_frame=%0d vga_bg=%0d vga_timing=%0d",
             n_music, n_effect, n_vga_sprite, n_vga_frame, n_vga_bg, n_vga_timing);
    if (n_cfg == 0)  begin failures++; $display("codec_config never happened"); end
    if (n_bus == 0)  begin failures++; $display("bus_readback never happened"); end
    if (n_led == 0)  begin failures++; $display("led never happened"); end
    if (n_mic == 0)  begin failures++; $display("mic never happened"); end
    if (n_irq == 0)  begin failures++; $display("irq_refill never happened"); end
    if (n_music == 0) begin failures++; $display("music never happened"); end
    if (n_effect == 0) begin failures++; $display("effect never happened"); end
    if (n_vga_sprite == 0) begin failures++; $display("vga_sprite never happened"); end
    if (n_vga_frame == 0) begin failures++; $display("vga_frame never happened"); end
    if (n_vga_bg == 0) begin failures++; $display("vga_bg never happened"); end
    if (n_vga_timing == 0) begin failures++; $display("vga_timing never happened"); end
    checks += 11;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000000) @(posedge clk50);
    failures++;
    $display("watchdog: stopped waiting");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
