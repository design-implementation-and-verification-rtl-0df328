// tb_encoder_filter: glitches shorter than 8 samples must not pass; a clean
// level change must appear after 8 samples at 6.25 MHz (57..67 cycles).
module tb_encoder_filter;
  logic clk = 0, rst_n = 0;
  logic [2:0] raw = '0, filt;
  int checks = 0, failures = 0;
  always #10 clk = ~clk;

  encoder_filter dut (.clk, .rst_n, .enc_raw(raw), .enc_filt(filt));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (100) @(posedge clk);
    for (int line = 0; line < 3; line++) begin
      // glitch of 40 cycles (5 samples at most): rejected
      raw[line] = 1; repeat (40) @(posedge clk); raw[line] = 0;
      repeat (100) @(posedge clk);
      check(filt[line] == 0, $sformatf("glitch passed on line %0d", line));
      // clean rise
      raw[line] = 1; lat = 0;
      while (filt[line] == 0 && lat < 200) begin @(posedge clk); lat++; end
      check(lat >= 56 && lat <= 68, $sformatf("rise latency %0d on line %0d", lat, line));
      check(filt == (3'b1 << line), "other lines unchanged");
      // glitch low of 30 cycles: rejected
      raw[line] = 0; repeat (30) @(posedge clk); raw[line] = 1;
      repeat (100) @(posedge clk);
      check(filt[line] == 1, "low glitch passed");
      raw[line] = 0; lat = 0;
      while (filt[line] == 1 && lat < 200) begin @(posedge clk); lat++; end
      check(lat >= 56 && lat <= 68, $sformatf("fall latency %0d", lat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
