// tb_adc_parallel_if: conversions through the AD7656 model in parallel word
// mode; first conversion discarded, later frames equal to the inputs,
// five RD strobes per conversion.
module tb_adc_parallel_if;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic convst, areset, cs_n, rd_n, busy_adc, valid, busy;
  logic [2:0] dout;
  logic [11:0] db;
  logic [11:0] ain [6];
  adc_frame_t frame;
  int n_conv, n_valid = 0, checks = 0, failures = 0, n_rd = 0;
  always #10 clk = ~clk;

  ad7656_model #(.SERIAL(0)) adc (.convst, .reset(areset), .cs_n, .sclk(1'b1), .rd_n, .ain,
                                  .busy(busy_adc), .dout, .db, .n_conv);
  adc_parallel_if dut (.clk, .rst_n, .start, .adc_convst(convst), .adc_reset(areset), .adc_cs_n(cs_n),
                       .adc_rd_n(rd_n), .adc_busy(busy_adc), .adc_db(db), .frame, .valid, .busy);

  always @(posedge clk) if (rst_n && valid) n_valid++;
  always @(negedge rd_n) if (!cs_n) n_rd++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (20) @(posedge clk);
    for (int k = 0; k < 6; k++) begin
      for (int i = 0; i < 6; i++) ain[i] = 12'($urandom);
      n_rd = 0;
      @(negedge clk) start = 1; @(negedge clk) start = 0;
      wait (!busy);
      @(posedge clk); #1;
      check(n_rd == 5, $sformatf("five reads, got %0d", n_rd));
      if (k == 0) check(n_valid == 0, "first conversion discarded");
      else begin
        check(n_valid == k, "one valid per later conversion");
        check(frame.v21 == ain[0] && frame.v32 == ain[1] && frame.v43 == ain[2] &&
              frame.ia == ain[3] && frame.ib == ain[4], $sformatf("frame %0d", k));
      end
      repeat (50) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
