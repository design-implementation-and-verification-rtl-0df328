// tb_mac_fpga_top_full: the complete controller at its real time constants
// (no parameter overrides): 50 MHz clock, 200 us switching period, 40-cycle
// blanking, 25 Hz button sampling and 3 Hz display refresh. Parallel AD7656
// model, encoder model turning at the rated 1500 rpm (one edge per 488 cycles). Checks the
// switching period, the discarded first conversion, switch-on through the
// button, the column power-up order, the blanking gap of 40 cycles on the
// gates, the open-loop angle increment (41 per period on a 12-bit
// accumulator), and the displayed v21 and speed after a display refresh.
module tb_mac_fpga_top_full;
  import mac_pkg::*;
  localparam int EP = 488;   // 102400 edges/s: the rated 1500 rpm
  logic clk = 0, rst_n = 0;
  logic enc_a = 0, enc_b = 0, enc_index = 0;
  logic convst, areset, cs_n, sclk, rd_n, busy;
  logic [11:0] db;
  logic [2:0] dout;
  logic [2:0] btn_n = 3'b111;
  logic [9:0] sw = '0, led;
  logic [6:0] hex_n [4];
  logic mtick, mpow;
  logic [9:0] mm;
  angle_t mth;
  logic signed [11:0] k2, k3;
  logic [13:0] thr [3][3];
  logic [11:0] gates [3];
  logic [11:0] ain [6];
  int n_conv;
  int checks = 0, failures = 0;
  always #10 clk = ~clk;

  mac_fpga_top dut (
    .clk, .rst_n, .enc_a, .enc_b, .enc_index, .adc_convst(convst), .adc_reset(areset),
    .adc_cs_n(cs_n), .adc_sclk(sclk), .adc_rd_n(rd_n), .adc_busy(busy), .adc_db(db),
    .btn_n, .sw, .led, .hex_n, .mod_tick(mtick), .mod_m(mm), .mod_theta(mth), .mod_k2(k2),
    .mod_k3(k3), .mod_pow(mpow), .mod_thr(thr), .gates);

  ad7656_model #(.SERIAL(0)) adc (.convst, .reset(areset), .cs_n, .sclk(1'b1), .rd_n, .ain,
                                  .busy, .dout, .db, .n_conv);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int enc_pos = 0;
  always begin
    repeat (EP) @(posedge clk);
    enc_pos++;
    {enc_b, enc_a} = (enc_pos % 4 == 0) ? 2'b00 : (enc_pos % 4 == 1) ? 2'b01 :
                     (enc_pos % 4 == 2) ? 2'b11 : 2'b10;
    enc_index = (enc_pos % 4096) >= 20 && (enc_pos % 4096) < 24;
  end

  // switching period and blanking gap measurement
  longint t = 0, t_tick = -1, t_off = -1;
  int n_period = 0, n_gap = 0, n_col_up = 0;
  logic [2:0] col_prev = '0;
  logic g0_prev = 0, g1_prev = 0;
  always @(posedge clk) if (rst_n) begin
    t++;
    if (mtick) begin
      if (t_tick >= 0) begin check(t - t_tick == TS_TU, "switching period"); n_period++; end
      t_tick = t;
    end
    // leg a, column 1 pair Sn11 / Sp13
    if (g0_prev && !gates[0][G_SN11]) t_off = t;
    if (!g1_prev && gates[0][G_SP13] && t_off >= 0) begin
      check(t - t_off == TB_TU, $sformatf("blanking gap %0d", t - t_off)); n_gap++;
    end
    g0_prev <= gates[0][G_SN11];
    g1_prev <= gates[0][G_SP13];
    if (led[6:4] != col_prev) begin
      n_col_up++;
      check(led[6:4] inside {3'b100, 3'b110, 3'b111}, "column order");
    end
    col_prev <= led[6:4];
  end

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
    #1_500_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    angle_t th0;
    int v;
    ain = '{12'd700, 12'd600, 12'd600, 12'd100, 12'hFCE, 12'd0};
    for (int l = 0; l < 3; l++) thr[l] = '{14'(1000 + 200 * l), 14'(2500 + 200 * l), 14'(4000 + 200 * l)};
    repeat (5) @(posedge clk); rst_n = 1;
    repeat (3 * TS_TU + 10) @(posedge clk);
    check(n_conv >= 2 && led[6:3] == 4'b0000, "idle after reset");
    // open-loop angle: 4 periods advance 4*41/4096 of a turn = 41 angle steps of 1024
    @(posedge clk iff mtick); @(posedge clk); th0 = mth;
    repeat (4) @(posedge clk iff mtick); @(posedge clk);
    v = int'(mth) - int'(th0); if (v < 0) v += 1024;
    check(v == 41, $sformatf("open-loop angle over 4 periods %0d", v));
    // switch on: hold the button over two 25 Hz samples
    btn_n[2] = 0; repeat (2 * BTN_TU + 1000) @(posedge clk);
    btn_n[2] = 1; repeat (BTN_TU) @(posedge clk);
    check(led[6:4] == 3'b111 && led[3], $sformatf("converter on, led=%b", led));
    check(n_col_up == 3, $sformatf("three power-up steps %0d", n_col_up));
    check(n_gap > 0, "blanking measured");
    // display: v21, then the speed (4 windows of 125000 cycles / 100 per edge)
    sw = 10'd11; repeat (DISP_TU + 1000) @(posedge clk);
    check(shown_value() == 700, $sformatf("display v21 %0d", shown_value()));
    sw = 10'd10; repeat (DISP_TU + 1000) @(posedge clk);
    v = shown_value();
    check(v >= 4 * SPEED_TU / EP - 8 && v <= 4 * SPEED_TU / EP + 8, $sformatf("speed %0d", v));
    check(led[9] && led[2:0] == 0, "index seen, no errors");
    $display("periods=%0d gaps=%0d", n_period, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
