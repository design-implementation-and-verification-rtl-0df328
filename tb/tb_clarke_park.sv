// tb_clarke_park: random currents and angles against the floating-point
// transformation id = sqrt2*(sin(phi+60)*ia + sin(phi)*ib),
// iq = sqrt2*(cos(phi+60)*ia + cos(phi)*ib), within 4 LSB; latency 2 cycles.
module tb_clarke_park;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, valid;
  adc_t ia, ib;
  angle_t phi;
  logic signed [13:0] id, iq;
  int checks = 0, failures = 0;
  always #10 clk = ~clk;

  clarke_park dut (.clk, .rst_n, .start, .ia, .ib, .phi, .id, .iq, .valid);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real pi, x, ed, eq;
    int ia0, ib0;
    pi = 3.14159265358979;
    ia = '0; ib = '0; phi = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      ia = adc_t'($urandom_range(0, 3000) - 1500);
      ib = adc_t'($urandom_range(0, 3000) - 1500);
      phi = angle_t'($urandom);
      ia0 = ia; ib0 = ib;
      start = 1;
      @(negedge clk) start = 0;
      ia = '0; ib = '0;          // inputs are latched at start
      check(!valid, "not valid after 1 cycle");
      @(negedge clk);
      check(valid, "valid after 2 cycles");
      x = 2.0 * pi * phi / 1024.0;
      ed = 1.41421356 * (4095.0 / 4096.0) * ($sin(x + pi / 3.0) * $itor(ia0) + $sin(x) * $itor(ib0));
      eq = 1.41421356 * (4095.0 / 4096.0) * ($cos(x + pi / 3.0) * $itor(ia0) + $cos(x) * $itor(ib0));
      check($itor(id) - ed < 4.0 && ed - $itor(id) < 4.0, $sformatf("id %0d exp %f", id, ed));
      check($itor(iq) - eq < 4.0 && eq - $itor(iq) < 4.0, $sformatf("iq %0d exp %f", iq, eq));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
