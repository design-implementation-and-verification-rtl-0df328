// tb_adc_serial_if: conversions through the AD7656 model in serial mode;
// the first conversion after reset must be discarded, later frames must
// match the analog inputs, and the transfer must take 32 ADC clocks.
module tb_adc_serial_if;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic convst, areset, cs_n, sclk, busy_adc, valid, busy;
  logic [2:0] dout;
  logic [11:0] db;
  logic [11:0] ain [6];
  adc_frame_t frame;
  int n_conv, n_valid = 0, checks = 0, failures = 0, sclk_rises = 0;
  always #10 clk = ~clk;

  ad7656_model #(.SERIAL(1)) adc (.convst, .reset(areset), .cs_n, .sclk, .rd_n(1'b1), .ain,
                                  .busy(busy_adc), .dout, .db, .n_conv);
  adc_serial_if dut (.clk, .rst_n, .start, .adc_convst(convst), .adc_reset(areset), .adc_cs_n(cs_n),
                     .adc_sclk(sclk), .adc_busy(busy_adc), .adc_dout(dout), .frame, .valid, .busy);

  always @(posedge clk) if (rst_n && valid) n_valid++;
  always @(posedge sclk) if (!cs_n) sclk_rises++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint t0;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (20) @(posedge clk);
    for (int k = 0; k < 6; k++) begin
      for (int i = 0; i < 6; i++) ain[i] = 12'($urandom);
      sclk_rises = 0;
      @(negedge clk) start = 1; @(negedge clk) start = 0;
      t0 = $time;
      wait (!busy);
      @(posedge clk); #1;
      check(sclk_rises == 32, $sformatf("32 ADC clocks, got %0d", sclk_rises));
      if (k == 0) check(n_valid == 0, "first conversion discarded");
      else begin
        check(n_valid == k, "one valid per later conversion");
        check(frame.v21 == ain[0] && frame.v32 == ain[1] && frame.v43 == ain[2] &&
              frame.ia == ain[3] && frame.ib == ain[4], $sformatf("frame %0d", k));
        // 2 + busy (~3 us) + 32*4 cycles
        check(($time - t0) < 3000 + 40 + 32 * 4 * 20 + 200, "transfer time");
      end
      repeat (50) @(posedge clk);
    end
    check(n_conv == 6, "six conversions started");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
