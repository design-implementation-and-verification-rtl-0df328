// tb_mac_fpga_top_serial: the complete controller with the three-line serial
// ADC link (ADC_PARALLEL = 0, DOUT A/B/C on DB8..DB10) at a shortened
// 1000-cycle period, against the AD7656 model in serial mode. Checks that
// the first conversion is discarded, that SCLK runs at clk/4 with 32 clocks
// per CS-low frame, that the five samples arrive in the right variables
// (shown on the display), that k2/k3 follow them, and that an over-current
// seen through the serial data trips the error and a soft restart clears it.
module tb_mac_fpga_top_serial;
  import mac_pkg::*;
  localparam int TS = 1000, BTN = 100, DISP = 500, STEP = 300;
  logic clk = 0, rst_n = 0;
  logic convst, areset, cs_n, sclk, rd_n, busy;
  logic [11:0] db, db_par;
  logic [2:0] dout;
  logic [2:0] btn_n = 3'b111;
  logic [9:0] sw = '0, led;
  logic [6:0] hex_n [4];
  logic mtick, mpow;
  logic [9:0] mm;
  angle_t mth;
  logic signed [11:0] k2, k3;
  logic [9:0] thr [3][3];
  logic [11:0] gates [3];
  logic [11:0] ain [6];
  int n_conv;
  int checks = 0, failures = 0;
  always #10 clk = ~clk;

  assign db = {1'b0, dout, 8'h00};

  mac_fpga_top #(.ADC_PARALLEL(1'b0), .TS(TS), .BTN_SMP(BTN), .DISP_REFRESH(DISP), .STEP_TU(STEP)) dut (
    .clk, .rst_n, .enc_a(1'b0), .enc_b(1'b0), .enc_index(1'b0), .adc_convst(convst), .adc_reset(areset),
    .adc_cs_n(cs_n), .adc_sclk(sclk), .adc_rd_n(rd_n), .adc_busy(busy), .adc_db(db),
    .btn_n, .sw, .led, .hex_n, .mod_tick(mtick), .mod_m(mm), .mod_theta(mth), .mod_k2(k2),
    .mod_k3(k3), .mod_pow(mpow), .mod_thr(thr), .gates);

  ad7656_model #(.SERIAL(1)) adc (.convst, .reset(areset), .cs_n, .sclk, .rd_n, .ain,
                                  .busy, .dout, .db(db_par), .n_conv);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // SCLK period and clocks per frame
  int n_fall = 0, n_frames = 0, n_valid = 0;
  longint t = 0, t_fall = -1;
  logic sclk_q = 1, cs_q = 1;
  always @(posedge clk) if (rst_n) begin
    t++;
    if (dut.adc_valid) n_valid++;
    if (sclk_q && !sclk) begin
      check(!cs_n, "SCLK only while CS is low");
      if (t_fall >= 0 && n_fall > 0) check(t - t_fall == ADC_SCLK_DIV, "SCLK period clk/4");
      t_fall = t; n_fall++;
    end
    if (!cs_q && cs_n) begin
      check(n_fall == 32, $sformatf("32 SCLK per frame (%0d)", n_fall));
      n_fall = 0; t_fall = -1; n_frames++;
    end
    sclk_q <= sclk; cs_q <= cs_n;
  end

  task automatic press(input int b);
    btn_n[b] = 0; repeat (3 * BTN) @(posedge clk);
    btn_n[b] = 1; repeat (3 * BTN) @(posedge clk);
  endtask

  function automatic int seg_digit(input logic [6:0] s);
    logic [6:0] pat [16] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19, 7'h12, 7'h02, 7'h78,
                             7'h00, 7'h10, 7'h08, 7'h03, 7'h46, 7'h21, 7'h06, 7'h0E};
    for (int i = 0; i < 16; i++) if (pat[i] == s) return i;
    return -1;
  endfunction
  function automatic int shown_value();
    return (seg_digit(hex_n[3]) << 12) | (seg_digit(hex_n[2]) << 8) | (seg_digit(hex_n[1]) << 4) | seg_digit(hex_n[0]);
  endfunction

  initial begin
    #20_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int expv [5];
    ain = '{12'd640, 12'd600, 12'd580, 12'd123, 12'hF85, 12'd0};   // ib = -123
    for (int l = 0; l < 3; l++) thr[l] = '{10'(100), 10'(250), 10'(400)};
    repeat (5) @(posedge clk); rst_n = 1;
    repeat (3 * TS) @(posedge clk);
    check(n_conv >= 2 && n_valid == n_conv - 1, $sformatf("first conversion discarded (%0d/%0d)", n_valid, n_conv));
    check(rd_n == 1'b0, "RD tied low in serial mode");
    // each sample through the display (values 11..15)
    expv = '{640, 600, 580, 123, 16'hFF85};
    for (int i = 0; i < 5; i++) begin
      sw = 10'(11 + i); repeat (3 * DISP) @(posedge clk);
      // the display may catch the shift register mid-transfer: take the value
      // when no transfer is running
      @(posedge clk iff dut.adc_valid); @(posedge clk);
      check(dut.shown == 16'(expv[i]) || 16'(dut.vals[11 + i]) == 16'(expv[i]),
            $sformatf("serial sample %0d = %0h", i, dut.vals[11 + i]));
    end
    // k2 = -(640 - 590) = -50, k3 = -(620 - 580) = -40 at kp3 = 16
    check(k2 == -50 && k3 == -40, $sformatf("k2=%0d k3=%0d", k2, k3));
    // over-current through the serial data, then a soft restart
    ain[4] = 12'h8A0;   // ib = -1888
    repeat (2 * TS) @(posedge clk);
    check(led[0], "over-current from serial samples");
    ain[4] = 12'hF85;
    repeat (2 * TS) @(posedge clk);
    press(2);
    check(!led[0], "soft restart");
    check(n_frames > 10, $sformatf("frames %0d", n_frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
