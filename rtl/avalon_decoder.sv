// avalon_decoder: connects the processor's Avalon-MM master to the slaves.
//
// The master's 8-bit word address is split into a slave select (bits 7:6:
// 0 VGA controller, 1 audio output, 2 audio input, 3 LED controller) and a
// 6-bit word address inside the slave. Requests are routed combinationally;
// every slave answers a read one clock later, so the decoder remembers which
// slave was read and returns its readdata with readdatavalid one clock after
// the read. This stands in for the generated switch fabric; the address map
// is own choice.
module avalon_decoder
  import ahp_pkg::*;
(
  input  logic              clk,
  input  logic              reset_n,
  input  logic [7:0]        m_address,
  input  logic              m_read,
  input  logic              m_write,
  input  logic [15:0]       m_writedata,
  output logic [15:0]       m_readdata,
  output logic              m_readdatavalid,
  output av_req_t [3:0]     s_req,
  input  logic [3:0][15:0]  s_readdata
);
  slave_e sel, sel_q;
  assign sel = slave_e'(m_address[7:6]);

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      s_req[i].chipselect = (sel == slave_e'(i)) && (m_read || m_write);
      s_req[i].read       = m_read;
      s_req[i].write      = m_write;
      s_req[i].address    = m_address[5:0];
      s_req[i].writedata  = m_writedata;
    end
  end

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      sel_q           <= SLV_VGA;
      m_readdatavalid <= 1'b0;
    end else begin
      m_readdatavalid <= m_read;
      if (m_read) sel_q <= sel;
    end
  end
  assign m_readdata = s_readdata[sel_q];

  // a master never reads and writes in the same cycle
  property p_excl;
    @(posedge clk) disable iff (!reset_n) !(m_read && m_write);
  endproperty
  assert property (p_excl) else $error("avalon_decoder: read and write together");
endmodule
