// tb_pi_compensator: random error sequences against a reference model of
// the saturating PI law (proportional + clamped integral), and clear.
module tb_pi_compensator;
  localparam int IN_W = 16, OUT_W = 10, KPS = 4, KIS = 8;
  logic clk = 0, rst_n = 0, en = 0, clear = 0, valid;
  logic signed [IN_W-1:0] r, fb;
  logic [7:0] kp, ki;
  logic signed [OUT_W-1:0] y;
  int checks = 0, failures = 0;
  always #10 clk = ~clk;

  pi_compensator #(.IN_W(IN_W), .OUT_W(OUT_W), .KP_SHIFT(KPS), .KI_SHIFT(KIS)) dut (
    .clk, .rst_n, .en, .clear, .ref_in(r), .fb, .kp, .ki, .y, .valid);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic longint clampv(input longint v);
    longint mx = (1 << (OUT_W - 1)) - 1;
    return v > mx ? mx : (v < -mx ? -mx : v);
  endfunction

  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint integ, e, yexp;
    int sat_hits = 0;
    r = '0; fb = '0; kp = 8'd20; ki = 8'd30;
    repeat (2) @(posedge clk); rst_n = 1;
    integ = 0;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      r  = IN_W'($urandom_range(0, 4000) - 2000);
      fb = IN_W'($urandom_range(0, 4000) - 2000);
      if (k % 50 == 0) begin kp = 8'($urandom); ki = 8'($urandom); end
      en = 1;
      @(negedge clk) en = 0;
      e = longint'(r) - longint'(fb);
      integ = clampv(integ + ((e * longint'(ki)) >>> KIS));
      yexp = clampv(((e * longint'(kp)) >>> KPS) + integ);
      if (yexp == 511 || yexp == -511) sat_hits++;
      check(valid, "valid one cycle after en");
      check(y == OUT_W'(yexp), $sformatf("k=%0d y=%0d exp=%0d", k, y, yexp));
    end
    check(sat_hits > 0, "saturation exercised");
    @(negedge clk) clear = 1; @(negedge clk) clear = 0;
    check(y == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
