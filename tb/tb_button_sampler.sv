// tb_button_sampler: a bouncing press gives exactly one one-cycle pulse;
// presses shorter than the sampling interval between two samples are missed.
module tb_button_sampler;
  localparam int SMP = 50;
  logic clk = 0, rst_n = 0;
  logic [2:0] btn_n = 3'b111, press;
  int checks = 0, failures = 0;
  int cnt [3] = '{0, 0, 0};
  int width_bad = 0;
  always #10 clk = ~clk;

  button_sampler #(.N(3), .SMP_TU(SMP)) dut (.clk, .rst_n, .btn_n, .press);

  logic [2:0] press_d;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 3; i++) if (press[i]) cnt[i]++;
    if (press & press_d) width_bad++;
    press_d <= press;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    press_d = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int b = 0; b < 3; b++) begin
      // bounce for 30 cycles then hold for 10 sample periods
      for (int i = 0; i < 15; i++) begin btn_n[b] = ~btn_n[b]; repeat (2) @(posedge clk); end
      btn_n[b] = 0; repeat (10 * SMP) @(posedge clk);
      for (int i = 0; i < 15; i++) begin btn_n[b] = ~btn_n[b]; repeat (2) @(posedge clk); end
      btn_n[b] = 1; repeat (5 * SMP) @(posedge clk);
      check(cnt[b] == 1, $sformatf("button %0d pulses %0d", b, cnt[b]));
    end
    check(width_bad == 0, "pulses last one cycle");
    // second press of button 0
    btn_n[0] = 0; repeat (3 * SMP) @(posedge clk); btn_n[0] = 1; repeat (3 * SMP) @(posedge clk);
    check(cnt[0] == 2, "second press");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
