// tb_vga_regfile: checks the start-up values, then random writes and reads
// against a reference copy, and that the parallel outputs follow writes.
module tb_vga_regfile;
  import ahp_pkg::*;
  logic clk = 0, reset_n = 0;
  av_req_t av;
  logic [15:0] readdata;
  logic [31:0][15:0] regs;
  logic [15:0] ref_regs [32];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  vga_regfile dut (.*);

  task automatic chk(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    int init_vals [32];
    for (int i = 0; i < 32; i++) init_vals[i] = 0;
    init_vals[1] = 224; init_vals[14] = 224; init_vals[2] = 184; init_vals[13] = 184;
    init_vals[3] = 184; init_vals[20] = 382; init_vals[21] = 382;
    init_vals[22] = 510; init_vals[23] = 490; init_vals[24] = 470; init_vals[25] = 450;
    init_vals[26] = 430; init_vals[27] = 330; init_vals[28] = 300; init_vals[29] = 270;
    av = '0;
    repeat (3) @(negedge clk); reset_n = 1;
    for (int i = 0; i < 32; i++) begin
      chk(regs[i], 16'(init_vals[i]), $sformatf("reset value %0d", i));
      ref_regs[i] = 16'(init_vals[i]);
    end
    for (int t = 0; t < 400; t++) begin
      int a;
      a = $urandom_range(0, 31);
      @(negedge clk);
      if ($urandom_range(0, 1)) begin
        logic [15:0] d;
        d = 16'($urandom);
        av = '{chipselect:1, read:0, write:1, address:6'(a), writedata:d};
        ref_regs[a] = d;
        @(negedge clk); av = '0;
        chk(regs[a], d, "parallel output");
      end else begin
        av = '{chipselect:1, read:1, write:0, address:6'(a), writedata:0};
        @(negedge clk); av = '0;
        chk(readdata, ref_regs[a], "read");
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
