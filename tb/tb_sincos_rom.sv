// tb_sincos_rom: every entry of both tables (phi and phi+60 deg) against
// 4095*sin and 4095*cos computed in floating point, within one LSB; checks
// the one-cycle read latency.
module tb_sincos_rom;
  logic clk = 0;
  logic [9:0] addr = '0;
  logic signed [12:0] s0, c0, s60, c60;
  int checks = 0, failures = 0;
  always #10 clk = ~clk;

  sincos_rom #(.OFFSET_SIXTHS(0)) r0  (.clk, .addr, .sin_q(s0),  .cos_q(c0));
  sincos_rom #(.OFFSET_SIXTHS(1)) r60 (.clk, .addr, .sin_q(s60), .cos_q(c60));

  function automatic bit near(input int a, input real b);
    return (real'(a) - b) <= 1.0 && (b - real'(a)) <= 1.0;
  endfunction

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real pi, x;
    pi = 3.14159265358979;
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk) addr = 10'(a);
      @(negedge clk);
      x = 2.0 * pi * a / 1024.0;
      checks += 4;
      if (!near(s0, 4095.0 * $sin(x)))              begin failures++; $display("FAIL sin %0d %0d", a, s0); end
      if (!near(c0, 4095.0 * $cos(x)))              begin failures++; $display("FAIL cos %0d %0d", a, c0); end
      if (!near(s60, 4095.0 * $sin(x + pi / 3.0)))  begin failures++; $display("FAIL sin60 %0d %0d", a, s60); end
      if (!near(c60, 4095.0 * $cos(x + pi / 3.0)))  begin failures++; $display("FAIL cos60 %0d %0d", a, c60); end
    end
    // latency: data must not follow the address combinationally
    @(negedge clk) addr = 10'd256;
    @(negedge clk) addr = 10'd0;
    #1;
    checks++;
    if (s0 != 13'sd4095) begin failures++; $display("FAIL latency"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
