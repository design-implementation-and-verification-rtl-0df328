// tb_polar_converter: m must be the largest r with r*(r-1) <= dd^2+dq^2
// (the rounded square root); theta must equal atan2(dd, dq)+phi computed in
// floating point within one step of 1/1024 turn; 12-cycle latency.
module tb_polar_converter;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, valid, busy;
  logic signed [9:0] dd, dq;
  angle_t phi, theta;
  logic [9:0] m;
  int checks = 0, failures = 0;
  always #10 clk = ~clk;

  polar_converter dut (.clk, .rst_n, .start, .dd, .dq, .phi, .m, .theta, .valid, .busy);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #4_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc, s, r, d;
    real pi, a;
    pi = 3.14159265358979;
    dd = '0; dq = '0; phi = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      dd = 10'($urandom); dq = 10'($urandom);
      if (k < 8) begin   // axes and diagonals
        dd = (k % 3 == 0) ? 10'sd0 : ((k & 1) ? 10'sd300 : -10'sd300);
        dq = (k % 3 == 1) ? 10'sd0 : ((k & 2) ? 10'sd300 : -10'sd300);
      end
      if (k == 8) begin dd = -10'sd512; dq = -10'sd512; end
      phi = angle_t'($urandom);
      start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!valid && cyc < 50) begin @(negedge clk); cyc++; end
      check(cyc == 12, $sformatf("latency %0d", cyc));
      s = int'(dd) * int'(dd) + int'(dq) * int'(dq);
      r = 0;
      while ((r + 1) * r <= s) r++;
      check(int'(m) == r, $sformatf("m %0d exp %0d (dd %0d dq %0d)", m, r, dd, dq));
      if (dd != 0 || dq != 0) begin
        a = $atan2($itor(dd), $itor(dq)) * 1024.0 / (2.0 * pi) + $itor(phi);
        d = (int'(theta) - int'($floor(a + 0.5))) % 1024;
        if (d < 0) d += 1024;
        check(d <= 1 || d == 1023, $sformatf("theta %0d exp %f (dd %0d dq %0d)", theta, a, dd, dq));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
