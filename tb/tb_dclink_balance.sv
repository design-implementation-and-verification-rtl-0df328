// tb_dclink_balance: k2 = -kp3*(v21 - (v32+v43)/2) / 16 and
// k3 = -kp3*((v21+v32)/2 - v43) / 16 (floor), saturated to 12 bits, on
// random inputs and on the voltage/gain pairs measured in the balance tests.
module tb_dclink_balance;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, valid;
  adc_t v21, v32, v43;
  logic [7:0] kp3;
  logic signed [11:0] k2, k3;
  int checks = 0, failures = 0;
  always #10 clk = ~clk;

  dclink_balance dut (.clk, .rst_n, .en, .v21, .v32, .v43, .kp3, .k2, .k3, .valid);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic longint sat(input longint v);
    return v > 2047 ? 2047 : (v < -2047 ? -2047 : v);
  endfunction

  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam int T_KP [19] = '{1, 3, 5, 7, 9, 11, 13, 15, 17, 19, 21, 23, 25, 27, 29, 32, 48, 64, 0};
  localparam real T_V [19][3] = '{'{67.2, 53.0, 72.3}, '{66.0, 56.9, 71.1}, '{65.8, 58.6, 65.0},
    '{65.3, 59.9, 64.3}, '{64.8, 60.6, 63.9}, '{64.7, 61.1, 63.7}, '{64.4, 61.6, 63.3},
    '{64.3, 62.1, 63.2}, '{64.2, 62.3, 63.2}, '{64.1, 62.5, 62.8}, '{64.1, 62.8, 62.6},
    '{63.9, 62.9, 62.8}, '{63.8, 62.9, 62.8}, '{63.8, 62.9, 62.7}, '{63.8, 63.2, 62.4},
    '{63.7, 63.2, 62.4}, '{63.5, 63.7, 62.3}, '{63.4, 63.9, 62.0}, '{70.5, 44.0, 78.9}};

  initial begin
    longint e2x2, e3x2, x2, x3;
    v21 = '0; v32 = '0; v43 = '0; kp3 = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      v21 = adc_t'($urandom_range(300, 800));
      v32 = adc_t'($urandom_range(300, 800));
      v43 = adc_t'($urandom_range(300, 800));
      kp3 = 8'($urandom_range(0, (k < 250) ? 80 : 255));
      en = 1;
      @(negedge clk) en = 0;
      e2x2 = 2 * longint'(v21) - longint'(v32) - longint'(v43);
      e3x2 = longint'(v21) + longint'(v32) - 2 * longint'(v43);
      x2 = sat((-e2x2 * longint'(kp3)) >>> 5);
      x3 = sat((-e3x2 * longint'(kp3)) >>> 5);
      check(valid, "valid");
      check(k2 == 12'(x2) && k3 == 12'(x3), $sformatf("k2 %0d/%0d k3 %0d/%0d", k2, x2, k3, x3));
    end
    // the measured operating points of the balance tests (kp3 = 1..64,
    // capacitor voltages in volts, 0.108 V per LSB): the corrections must
    // stay unsaturated and point so as to discharge the highest capacitor
    for (int r = 0; r < $size(T_KP); r++) begin
      @(negedge clk);
      v21 = adc_t'(int'(T_V[r][0] / 0.108)); v32 = adc_t'(int'(T_V[r][1] / 0.108));
      v43 = adc_t'(int'(T_V[r][2] / 0.108)); kp3 = 8'(T_KP[r]); en = 1;
      @(negedge clk) en = 0;
      e2x2 = 2 * longint'(v21) - longint'(v32) - longint'(v43);
      e3x2 = longint'(v21) + longint'(v32) - 2 * longint'(v43);
      x2 = (-e2x2 * longint'(kp3)) >>> 5;
      x3 = (-e3x2 * longint'(kp3)) >>> 5;
      check(k2 == 12'(x2) && k3 == 12'(x3) && x2 > -2047 && x2 < 2047 && x3 > -2047 && x3 < 2047,
            $sformatf("operating point kp3=%0d: k2 %0d/%0d k3 %0d/%0d", kp3, k2, x2, k3, x3));
    end
    // balanced voltages give zero correction
    @(negedge clk) v21 = 12'sd600; v32 = 12'sd600; v43 = 12'sd600; kp3 = 8'd64; en = 1;
    @(negedge clk) en = 0;
    check(k2 == 0 && k3 == 0, "balanced -> zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
