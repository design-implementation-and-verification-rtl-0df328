// tb_seq_divider: random unsigned divisions against the / operator, the
// NW-cycle latency, and division by zero.
module tb_seq_divider;
  localparam int NW = 38, DW = 14;
  logic clk = 0, rst_n = 0, start = 0, done, busy;
  logic [NW-1:0] num, quot;
  logic [DW-1:0] den;
  int checks = 0, failures = 0;
  always #10 clk = ~clk;

  seq_divider #(.NW(NW), .DW(DW)) dut (.clk, .rst_n, .start, .num, .den, .quot, .done, .busy);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc;
    num = '0; den = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      num = {$urandom, $urandom} >> $urandom_range(0, 30);
      num = num & ((64'd1 << NW) - 1);
      den = (k == 7) ? '0 : DW'($urandom_range(1, (1 << DW) - 1));
      // every third case an exact multiple: the partial remainder then hits
      // the divisor exactly, the boundary of the restoring compare
      if (k % 3 == 1) num = NW'(longint'($urandom_range(1, 1 << 20)) * longint'(den));
      start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done && cyc < 100) begin @(negedge clk); cyc++; end
      check(cyc == NW + 1, $sformatf("latency %0d", cyc));
      if (den == 0) check(quot == '1, "divide by zero gives all ones");
      else check(quot == num / den, $sformatf("%0d / %0d = %0d", num, den, quot));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
