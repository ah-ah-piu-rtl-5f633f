// tb_avalon_decoder: random accesses; only the addressed slave may see
// chipselect, address and data pass through, and read data returns from the
// addressed slave one clock later with readdatavalid.
module tb_avalon_decoder;
  import ahp_pkg::*;
  logic clk = 0, reset_n = 0;
  logic [7:0] m_address;
  logic m_read, m_write, m_readdatavalid;
  logic [15:0] m_writedata, m_readdata;
  av_req_t [3:0] s_req;
  logic [3:0][15:0] s_readdata;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  avalon_decoder dut (.*);

  // each slave answers with {slave, address} one clock after a read
  always_ff @(posedge clk)
    for (int i = 0; i < 4; i++)
      if (s_req[i].chipselect && s_req[i].read)
        s_readdata[i] <= {4'(i), 6'd0, s_req[i].address};

  initial begin
    m_read = 0; m_write = 0; m_address = 0; m_writedata = 0;
    repeat (3) @(negedge clk); reset_n = 1;
    for (int t = 0; t < 500; t++) begin
      int a;
      bit rd;
      a = $urandom_range(0, 255);
      rd = 1'($urandom_range(0, 1));
      @(negedge clk);
      m_address = 8'(a); m_read = rd; m_write = !rd; m_writedata = 16'($urandom);
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (s_req[i].chipselect != (i == a / 64) ||
            (i == a / 64 && (s_req[i].address != 6'(a % 64) || s_req[i].writedata != m_writedata ||
                             s_req[i].read != rd || s_req[i].write != !rd))) begin
          failures++; $display("addr %0d slave %0d: bad request", a, i);
        end
      end
      @(negedge clk);
      m_read = 0; m_write = 0;
      checks++;
      if (m_readdatavalid != rd || (rd && m_readdata != {4'(a / 64), 6'd0, 6'(a % 64)})) begin
        failures++; $display("addr %0d: readdata %h valid %b", a, m_readdata, m_readdatavalid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
