// vga_regfile: the VGA controller's register buffer shared with software.
//
// 32 registers of 16 bits, written and read over an Avalon-MM slave port
// (word addresses 0..31, readdata registered, one clock of read latency).
// All registers are visible in parallel to the display logic, so the drawing
// pipeline never deals with the bus. The register meanings are listed in
// ahp_pkg::vga_reg_e. Reset loads the start-up values of the original design
// (element positions, ammo and life icon columns); the rest clear to 0.
module vga_regfile
  import ahp_pkg::*;
(
  input  logic              clk,
  input  logic              reset_n,
  input  av_req_t           av,
  output logic [15:0]       readdata,
  output logic [31:0][15:0] regs
);
  function automatic logic [15:0] reset_value(input int r);
    case (r)
      1, 14:     return 16'd224;
      2, 13, 3:  return 16'd184;
      20, 21:    return 16'd382;
      22:        return 16'd510;
      23:        return 16'd490;
      24:        return 16'd470;
      25:        return 16'd450;
      26:        return 16'd430;
      27:        return 16'd330;
      28:        return 16'd300;
      29:        return 16'd270;
      default:   return 16'd0;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      for (int r = 0; r < 32; r++) regs[r] <= reset_value(r);
      readdata <= '0;
    end else if (av.chipselect) begin
      if (av.read)
        readdata <= regs[av.address[4:0]];
      else if (av.write)
        regs[av.address[4:0]] <= av.writedata;
    end
  end
endmodule
