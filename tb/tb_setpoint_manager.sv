// tb_setpoint_manager: open-loop angle advances delta_fit_0/4 steps per
// period (12-bit accumulator), m* and theta* selection per mode, iq*
// selection (user or speed PI), and the power-flow sign.
module tb_setpoint_manager;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0, tick = 0, speed_valid = 0, pow, loops_clear;
  mode_e mode;
  logic [9:0] m_user, m_polar, m_star;
  logic [7:0] dfit, kp_w, ki_w;
  logic signed [13:0] iq_user, id, iq, iq_ref;
  logic signed [15:0] speed_ref, speed;
  angle_t theta_polar, theta_star;
  logic signed [9:0] dd, dq;
  int checks = 0, failures = 0;
  always #10 clk = ~clk;

  setpoint_manager dut (.clk, .rst_n, .tick, .mode, .m_user, .delta_fit_0(dfit), .iq_user,
    .speed_ref, .speed, .speed_valid, .kp_w, .ki_w, .m_polar, .theta_polar, .dd, .dq, .id, .iq,
    .iq_ref, .m_star, .theta_star, .pow, .loops_clear);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pulse_tick();
    @(negedge clk) tick = 1; @(negedge clk) tick = 0;
  endtask

  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    mode = MODE_OPEN; m_user = 10'd300; m_polar = 10'd123; dfit = 8'd41; kp_w = 8'd4; ki_w = 8'd1;
    iq_user = 14'sd200; speed_ref = 16'sd100; speed = 16'sd0; id = '0; iq = '0;
    theta_polar = 10'd77; dd = '0; dq = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 1; n <= 300; n++) begin
      pulse_tick();
      check(theta_star == 10'(((n * 41) % 4096) >> 2), $sformatf("open-loop angle at %0d", n));
    end
    check(m_star == 10'd300 && iq_ref == 0 && loops_clear, "mode 0 outputs");
    mode = MODE_CURRENT; #1;
    check(m_star == 10'd123 && theta_star == 10'd77 && iq_ref == 14'sd200 && !loops_clear, "mode 1 outputs");
    mode = MODE_SPEED; #1;
    check(iq_ref == 0, "speed PI starts at zero");
    @(negedge clk) speed_valid = 1; @(negedge clk) speed_valid = 0;
    // e = 100, p = 100*4>>2 = 100, i = 100*1>>6 = 1
    check(iq_ref == 14'sd101, $sformatf("speed PI output %0d", iq_ref));
    @(negedge clk) speed_valid = 1; @(negedge clk) speed_valid = 0;
    check(iq_ref == 14'sd102, $sformatf("speed PI integrates %0d", iq_ref));
    mode = MODE_OPEN; @(negedge clk); mode = MODE_SPEED; #1;
    check(iq_ref == 0, "speed PI cleared outside mode 2");
    // power sign
    dd = 10'sd100; dq = 10'sd50; id = 14'sd10; iq = 14'sd20; pulse_tick(); #1;
    check(pow == 1, "positive power");
    dd = -10'sd100; dq = -10'sd50; pulse_tick(); #1;
    check(pow == 0, "negative power");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
