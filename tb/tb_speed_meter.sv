// tb_speed_meter: edges per window pushed into a 4-deep history; output is
// the sum of the last 4 window counts, updated once per window of WIN cycles.
module tb_speed_meter;
  localparam int WIN = 200;
  logic clk = 0, rst_n = 0, up = 0, dn = 0;
  logic signed [15:0] speed;
  logic valid;
  int checks = 0, failures = 0;
  int hist [4] = '{0, 0, 0, 0};
  longint t_last;
  always #10 clk = ~clk;

  speed_meter #(.WIN_TU(WIN)) dut (.clk, .rst_n, .edge_up(up), .edge_dn(dn), .speed, .speed_valid(valid));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int rate [10] = '{5, 10, -3, 20, 0, 7, -15, 40, 1, 2};
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(posedge clk iff valid);
    t_last = $time;
    for (int w = 0; w < 10; w++) begin
      // rate[w] edges inside this window, one every 4 cycles
      for (int e = 0; e < (rate[w] < 0 ? -rate[w] : rate[w]); e++) begin
        @(negedge clk); up = rate[w] > 0; dn = rate[w] < 0;
        @(negedge clk); up = 0; dn = 0;
        repeat (2) @(negedge clk);
      end
      @(posedge clk iff valid);
      check(($time - t_last) == WIN * 20, $sformatf("window length %0d ns", $time - t_last));
      t_last = $time;
      hist[3] = hist[2]; hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = rate[w];
      #1;
      check(speed == 16'(hist[0] + hist[1] + hist[2] + hist[3]),
            $sformatf("window %0d speed %0d exp %0d", w, speed, hist[0] + hist[1] + hist[2] + hist[3]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
