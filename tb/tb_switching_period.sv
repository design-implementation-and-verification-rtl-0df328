// tb_switching_period: tick every TS cycles, counter 0..TS-1, triangular
// carrier 0..TS/2..0.
module tb_switching_period;
  localparam int TS = 100;
  logic clk = 0, rst_n = 0, tick;
  logic [6:0] count, carrier;
  int checks = 0, failures = 0, ticks = 0, last = -1, t = 0;
  always #10 clk = ~clk;

  switching_period #(.TS(TS)) dut (.clk, .rst_n, .tick, .count, .carrier);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (t = 0; t < 10 * TS; t++) begin
      @(negedge clk);
      if (tick) begin
        check(count == 0, "tick with count 0");
        if (last >= 0) check(t - last == TS, $sformatf("period %0d", t - last));
        last = t; ticks++;
      end
      check(int'(carrier) == (count < TS / 2 ? int'(count) : TS - int'(count)), "carrier");
    end
    check(ticks >= 9, "ticks seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
