// tb_audio_out: decodes DACDAT with the block's bit clock and checks
//  - left channel: the music stream, continuous across interrupt-driven
//    refills of words 1..31 (at least three refills),
//  - right channel: music while no effect plays; during an effect exactly
//    the ROM words from the effect's start to its end address, then music,
//  - effect 2 starts at its start address; effect 3 plays every word up to
//    its end address (16183) and stops,
//  - the interrupt clears on a bus write,
//  - at the default dividers (second instance) DACLRC has a period of
//    2 x 4168 clocks (6 kHz at 50 MHz) with 16 bit clocks per half frame.
// The first instance uses short dividers to keep the run short; both shift
// with their own bit clock looped back into bclk_in.
module tb_audio_out;
  import ahp_pkg::*;
  logic clk = 0, reset_n = 0;
  av_req_t av, av_idle;
  logic [15:0] readdata, readdata2;
  logic request, request2;
  logic [13:0] rom_addr, rom_addr2;
  logic [15:0] rom_data, rom_data2;
  logic dac_lrck, dac_dat, dac_bclk, lrck2, dat2, bclk2;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  audio_out #(.LRCK_DIV(161), .BCLK_DIV(9), .BCLK_SET(4)) dut (
    .clk, .reset_n, .av, .readdata, .request, .rom_addr, .rom_data,
    .dac_lrck, .dac_dat, .dac_bclk, .bclk_in(dac_bclk));
  audio_out dut_full (.clk, .reset_n, .av(av_idle), .readdata(readdata2), .request(request2),
    .rom_addr(rom_addr2), .rom_data(rom_data2), .dac_lrck(lrck2), .dac_dat(dat2), .dac_bclk(bclk2), .bclk_in(bclk2));

  // ROM model: word = {2'b11, address}, one clock latency
  always_ff @(posedge clk) begin
    rom_data  <= {2'b11, rom_addr};
    rom_data2 <= {2'b11, rom_addr2};
  end

  // ---------------------------------------------- serial decoder
  logic [15:0] sh;
  int nbits = 0;
  logic [15:0] left_q [$], right_q [$];
  always @(posedge dac_bclk) begin sh = {sh[14:0], dac_dat}; nbits++; end
  always @(dac_lrck) begin
    if (nbits == 16) begin
      if (!dac_lrck) left_q.push_back(sh);     // word of the half frame with LRCK high
      else           right_q.push_back(sh);
    end
    nbits = 0;
  end

  // ---------------------------------------------- bus and interrupt handler
  int music = 0, irqs = 0;
  bit handler_on = 1;
  semaphore bus = new(1);
  task automatic wr(input int a, input int d);
    bus.get(1);
    @(negedge clk); av = '{chipselect:1, read:0, write:1, address:6'(a), writedata:16'(d)};
    @(negedge clk); av = '0;
    bus.put(1);
  endtask
  task automatic refill();
    for (int i = 1; i <= 31; i++) begin wr(i, music); music++; end
  endtask
  always @(posedge clk) if (reset_n && request && handler_on) begin
    irqs++;
    refill();
    checks++;
    if (request) begin failures++; $display("request not cleared by writes"); end
  end

  function automatic void chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; if (failures < 20) $display("%s: got %0h expected %0h", what, got, exp); end
  endfunction

  initial begin
    int lw, rw, base;
    av = '0; av_idle = '0;
    repeat (3) @(negedge clk); reset_n = 1;
    refill();
    // music only, 100 frames
    while (!(left_q.size() >= 100)) @(posedge clk);
    for (int i = 0; i < 100; i++) chk(int'(left_q[i]), i, "music left");
    for (int i = 0; i + 1 < 100 && i + 1 < right_q.size(); i++) chk(int'(right_q[i + 1]), i, "music right");  // entry 0: blank word before the first load
    chk(int'(irqs >= 3), 1, "refill interrupts");
    // effect 1: set start, then play
    wr(0, 1);
    repeat (400) @(negedge clk);
    wr(0, 2);
    rw = right_q.size();
    lw = left_q.size();
    while (!(right_q.size() >= rw + 6314 + 20)) @(posedge clk);
    begin
      int first, n, after;
      first = -1; n = 0; after = 0;
      for (int i = rw; i < right_q.size(); i++) begin
        if (right_q[i][15:14] == 2'b11) begin
          if (first < 0) first = i;
          chk(int'(right_q[i][13:0]), n, "effect 1 word");
          n++;
        end else if (first >= 0) after++;
      end
      chk(n, 6314, "effect 1 length");
      chk(int'(after > 5), 1, "music back after effect");
      chk(int'(first - rw <= 1), 1, "effect 1 starts at once");
    end
    // left channel kept playing music throughout
    for (int i = lw + 1; i < left_q.size(); i++)
      chk(int'(left_q[i]), int'(left_q[i - 1]) + 1, "music continues during effect");
    // effect 2 start address
    wr(0, 3);
    repeat (400) @(negedge clk);
    wr(0, 4);
    rw = right_q.size();
    while (!(right_q.size() >= rw + 30)) @(posedge clk);
    base = -1;
    for (int i = rw; i < rw + 30; i++)
      if (right_q[i][15:14] == 2'b11) begin
        if (base < 0) base = int'(right_q[i][13:0]);
      end
    chk(base, 6314, "effect 2 start");
    // command 0 silences the effect channel
    wr(0, 0);
    rw = right_q.size();
    while (!(right_q.size() >= rw + 5)) @(posedge clk);
    chk(int'(right_q[rw + 2][15:14] != 2'b11), 1, "command 0 stops the effect");
    // effect 3 played to its end address 16184
    wr(0, 5);
    repeat (400) @(negedge clk);
    wr(0, 6);
    rw = right_q.size();
    while (!(right_q.size() >= rw + 5534 + 20)) @(posedge clk);
    begin
      int n, last;
      n = 0; last = -1;
      for (int i = rw; i < right_q.size(); i++)
        if (right_q[i][15:14] == 2'b11) begin
          chk(int'(right_q[i][13:0]), 10650 + n, "effect 3 word");
          n++;
          last = int'(right_q[i][13:0]);
        end
      chk(n, 5534, "effect 3 length");
      chk(last, 16183, "effect 3 last address");
    end
    // stop the handler and check that request stays up until a write
    handler_on = 0;
    wait (request);
    repeat (50) @(negedge clk);
    chk(int'(request), 1, "request held");
    wr(5, 0);
    chk(int'(request), 0, "request cleared by write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // default dividers: 6 kHz frame and 16 bit clocks per half frame
  initial begin
    time t0, t1;
    int nb;
    @(posedge reset_n);
    @(posedge lrck2); t0 = $time;
    nb = 0;
    fork
      begin @(negedge lrck2); end
      forever @(posedge bclk2) nb++;
    join_any
    disable fork;
    @(posedge lrck2); t1 = $time;
    chk(int'((t1 - t0) / 10), 2 * 4168, "full-size frame period");
    chk(nb, 16, "full-size bits per half frame");
  end

  initial begin
    repeat (9000000) @(posedge clk);
    $display("timeout: left=%0d right=%0d irqs=%0d nbits=%0d music=%0d", left_q.size(), right_q.size(), irqs, nbits, music);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
