// sfx_rom: 16K x 16 sound-effect memory.
//
// Holds the three effects one after the other (words 0..6313, 6314..10649,
// 10650..16183; see ahp_pkg) as 16-bit two's-complement samples at the 6 kHz
// output rate. Read is synchronous: q shows the word one clock after addr.
// Contents come from INIT_FILE (hex, one word per line) when given; otherwise
// each effect is filled with a triangle tone of its own pitch (periods 24,
// 40 and 16 samples) so the path can be heard and tested, because the
// recorded effects are not part of this design.
module sfx_rom
  import ahp_pkg::*;
#(
  parameter string INIT_FILE = ""
) (
  input  logic              clk,
  input  logic [SFX_AW-1:0] addr,
  output logic [15:0]       q
);
  localparam int DEPTH = 1 << SFX_AW;
  logic [15:0] mem [DEPTH];

  function automatic logic [15:0] tone(input int a);
    int period, ph, v;
    period = (a < int'(SFX1_END)) ? 24 : (a < int'(SFX2_END)) ? 40 : 16;
    ph = a % period;
    v  = (ph < period / 2) ? ph : period - ph;      // 0 .. period/2
    v  = (v * 16000) / (period / 2) - 8000;         // -8000 .. +8000
    return (a < int'(SFX3_END)) ? 16'(v) : 16'd0;
  endfunction

  initial begin
    if (INIT_FILE != "")
      $readmemh(INIT_FILE, mem);
    else
      for (int a = 0; a < DEPTH; a++) mem[a] = tone(a);
  end

  always_ff @(posedge clk) q <= mem[addr];
endmodule
