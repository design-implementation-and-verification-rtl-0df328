// tb_hexa_nss: the 16 digit patterns, written here segment by segment
// (a..g lit), active-low at the output.
module tb_hexa_nss;
  logic [3:0] hex;
  logic [6:0] seg_n;
  int checks = 0, failures = 0;

  hexa_nss dut (.hex, .seg_n);

  // lit segments per digit as letters
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  initial begin
    for (int d = 0; d < 16; d++) begin
      logic [6:0] e;
      e = '1;
      for (int i = 0; i < lit[d].len(); i++) e[lit[d][i] - "a"] = 1'b0;
      hex = 4'(d); #1;
      checks++;
      if (seg_n !== e) begin failures++; $display("FAIL digit %h: %b exp %b", d, seg_n, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
