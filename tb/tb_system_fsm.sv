// tb_system_fsm: power-up order 0000-1000-1100-1110-1111 and back, one step
// per STEP_TU; over-current / over-voltage / encoder errors latch and force
// the switch-off; restart is soft for I/V errors and full for the encoder.
module tb_system_fsm;
  import mac_pkg::*;
  localparam int STEP = 20;
  logic clk = 0, rst_n = 0, on_t = 0, restart = 0, adc_valid = 0, enc_err = 0;
  adc_frame_t adc;
  logic [3:0] estat;
  logic [2:0] errf;
  logic error, full_restart;
  int checks = 0, failures = 0, n_full = 0;
  always #10 clk = ~clk;

  system_fsm #(.STEP_TU(STEP)) dut (.clk, .rst_n, .on_toggle(on_t), .restart, .adc_valid, .adc,
    .enc_err, .estat, .err_flags(errf), .error, .full_restart);

  always @(posedge clk) if (rst_n && full_restart) n_full++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1; @(negedge clk) s = 0;
  endtask

  // record the sequence of distinct estat values
  logic [3:0] seq [$];
  always @(posedge clk) if (rst_n && (seq.size() == 0 || seq[$] != estat)) seq.push_back(estat);

  task automatic expect_seq(input logic [3:0] e [], input string what);
    bit ok = (seq.size() == e.size());
    for (int i = 0; ok && i < e.size(); i++) ok = (seq[i] == e[i]);
    check(ok, what);
    if (!ok) foreach (seq[i]) $display("  seq[%0d] = %b", i, seq[i]);
  endtask

  task automatic adc_sample(input int ia, input int ib, input int v);
    adc.ia = adc_t'(ia); adc.ib = adc_t'(ib); adc.v21 = adc_t'(v); adc.v32 = adc_t'(v); adc.v43 = adc_t'(v);
    pulse(adc_valid);
  endtask

  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    adc = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); seq.delete();
    pulse(on_t);
    repeat (5 * STEP) @(negedge clk);
    expect_seq('{4'b0000, 4'b1000, 4'b1100, 4'b1110, 4'b1111}, "power-up order");
    seq.delete();
    pulse(on_t);
    repeat (5 * STEP) @(negedge clk);
    expect_seq('{4'b1111, 4'b1110, 4'b1100, 4'b1000, 4'b0000}, "power-down order");
    // normal samples: no error
    adc_sample(1000, -500, 600);
    check(!error, "no error in range");
    // over-current through ic = -(ia+ib)
    pulse(on_t); repeat (5 * STEP) @(negedge clk);
    check(estat == 4'b1111, "on again");
    adc_sample(1200, 1000, 600);
    check(errf == 3'b001 && error, "over-current on ic latched");
    adc_sample(0, 0, 600);
    check(errf == 3'b001, "error held");
    repeat (4 * STEP) @(negedge clk);
    check(estat == 4'b0000, "switched off after error");
    pulse(on_t); repeat (2 * STEP) @(negedge clk);
    check(estat == 4'b0000, "cannot switch on with an error");
    pulse(restart);
    check(errf == 0 && n_full == 0, "soft restart clears I/V errors");
    adc_sample(0, 0, 900);
    check(errf == 3'b010, "over-voltage latched");
    pulse(restart);
    check(errf == 0 && n_full == 0, "soft restart after over-voltage");
    pulse(enc_err);
    check(errf == 3'b100, "encoder error latched");
    pulse(restart);
    @(negedge clk);
    check(n_full == 1, "full restart after encoder error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
