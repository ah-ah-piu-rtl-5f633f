// tb_seg7_decoder: checks every input code of seg7_decoder against the
// segments a digit lights (a..g), with blanking for codes above 9.
module tb_seg7_decoder;
  logic [3:0] digit;
  logic [6:0] seg_n;
  int checks = 0, failures = 0;
  seg7_decoder dut (.digit, .seg_n);

  // lit segments per digit as a string of segment letters
  function automatic string lit(input int d);
    case (d)
      0: return "abcdef";  1: return "bc";     2: return "abdeg";  3: return "abcdg";
      4: return "bcfg";    5: return "acdfg";  6: return "acdefg"; 7: return "abc";
      8: return "abcdefg"; 9: return "abcdfg"; default: return "";
    endcase
  endfunction
  function automatic logic [6:0] expect_n(input int d);
    logic [6:0] on = '0;
    string s = lit(d);
    for (int i = 0; i < s.len(); i++) on[s[i] - "a"] = 1'b1;
    return ~on;
  endfunction

  initial begin
    for (int d = 0; d < 16; d++) begin
      digit = 4'(d);
      #1;
      checks++;
      if (seg_n !== expect_n(d)) begin
        failures++;
        $display("digit %0d: got %b expected %b", d, seg_n, expect_n(d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
