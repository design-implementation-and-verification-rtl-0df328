// tb_mac_fpga_top: end-to-end run of the control system at shortened time
// constants (period 1000 cycles, fast buttons and display). A quadrature
// encoder model turns the rotor, an AD7656 model (parallel mode) supplies
// unbalanced dc-link voltages and phase currents, and the buttons walk the
// design through: first ADC conversion discarded, parameter editing, display
// refresh, ordered power-up, open loop, current loop, speed loop, an
// over-current with soft restart, an encoder error with full restart and
// the ordered power-down. Each mechanism is counted and must occur.
module tb_mac_fpga_top;
  import mac_pkg::*;
  localparam int TS = 1000, BTN = 100, DISP = 500, STEP = 300, WIN = 2000, EP = 100;
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
  logic [9:0] thr [3][3];
  logic [11:0] gates [3];
  logic [11:0] ain [6];
  int n_conv;
  int checks = 0, failures = 0;
  always #10 clk = ~clk;

  mac_fpga_top #(.ADC_PARALLEL(1'b1), .TS(TS), .SPEED_WIN(WIN), .BTN_SMP(BTN), .DISP_REFRESH(DISP),
                 .STEP_TU(STEP)) dut (
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

  // ---------------- encoder model: forward rotation, one edge every EP cycles (slower than
  // the 8-sample filter)
  bit enc_run = 1;
  int enc_pos = 0;
  always begin
    repeat (EP) @(posedge clk);
    if (enc_run) begin
      enc_pos++;
      {enc_b, enc_a} = (enc_pos % 4 == 0) ? 2'b00 : (enc_pos % 4 == 1) ? 2'b01 :
                       (enc_pos % 4 == 2) ? 2'b11 : 2'b10;
      enc_index = (enc_pos % 4096) >= 20 && (enc_pos % 4096) < 24;
    end
  end

  // ---------------- mechanism counters
  int n_valid = 0, n_col_up = 0, n_col_down = 0, n_blank = 0, n_soft = 0, n_full = 0;
  int n_mode_sw = 0, n_disp = 0, n_oc = 0, n_encerr = 0, n_ol_step = 0, n_polar = 0;
  logic [2:0] col_prev = '0;
  logic [1:0] mode_prev = '0;
  logic [15:0] shown_prev = '0;
  always @(posedge clk) if (rst_n) begin
    if (dut.adc_valid) n_valid++;
    if (dut.pc_valid) n_polar++;
    if (led[6:4] != col_prev) begin
      if (led[6:4] > col_prev) n_col_up++; else n_col_down++;
      // thermometer order: column 1 first on, last off
      check(led[6:4] inside {3'b000, 3'b100, 3'b110, 3'b111}, "column order");
    end
    col_prev <= led[6:4];
    if (led[8:7] != mode_prev) n_mode_sw++;
    mode_prev <= led[8:7];
    if (dut.shown != shown_prev) n_disp++;
    shown_prev <= dut.shown;
    for (int l = 0; l < 3; l++) begin
      // blanking: a device pair with both switches off while the column is on
      if (led[6] && !gates[l][0] && !gates[l][1]) n_blank++;
      check(!(gates[l][0] && gates[l][1]) && !(gates[l][2] && gates[l][3]) &&
            !(gates[l][4] && gates[l][5]), "no complementary overlap");
    end
  end

  task automatic press(input int b);
    btn_n[b] = 0; repeat (3 * BTN) @(posedge clk);
    btn_n[b] = 1; repeat (3 * BTN) @(posedge clk);
  endtask

  task automatic periods(input int n);
    repeat (n * TS) @(posedge clk);
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
    #60_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    angle_t th0;
    int v;
    ain = '{12'd700, 12'd600, 12'd600, 12'd100, 12'hFCE, 12'd0};   // v21 v32 v43 ia ib=-50
    // thresholds of a symmetric 4-level pattern (stand-in for the modulator)
    for (int l = 0; l < 3; l++) thr[l] = '{10'(100 + 20 * l), 10'(250 + 20 * l), 10'(400 + 20 * l)};
    repeat (5) @(posedge clk); rst_n = 1;
    periods(3);
    check(n_conv >= 2 && n_valid == n_conv - 1, $sformatf("first conversion discarded (%0d/%0d)", n_valid, n_conv));
    // --- edit open-loop m* = 64 (4 coarse steps)
    sw = 10'b1_0001;
    repeat (4) press(0);
    check(mm == 10'd64, $sformatf("mode 0 m* = user value, %0d", mm));
    // --- display of v21
    sw = 10'd11; repeat (3 * DISP) @(posedge clk);
    check(shown_value() == 700, $sformatf("display shows v21: %0d", shown_value()));
    check(k2 == -100 && k3 == -50, $sformatf("dc-link balance k2=%0d k3=%0d", k2, k3));
    // --- open-loop angle: 41/4 steps per period
    @(posedge clk iff mtick); @(posedge clk); th0 = mth;
    @(posedge clk iff mtick); @(posedge clk);
    v = int'(mth) - int'(th0); if (v < 0) v += 1024;
    check(v == 10 || v == 11, $sformatf("open-loop angle step %0d", v));
    if (v == 10 || v == 11) n_ol_step++;
    // --- switch on
    press(2);
    periods(2);
    check(led[6:4] == 3'b111 && led[3], "converter on");
    periods(2);
    check(n_blank > 0, "blanking observed");
    // --- speed measurement: one edge per EP cycles -> 4*WIN/EP per sum
    sw = 10'd10; repeat (3 * DISP) @(posedge clk);
    v = shown_value();
    check(v >= 4 * WIN / EP - 4 && v <= 4 * WIN / EP + 4, $sformatf("speed %0d", v));
    check(led[9], "encoder index seen");
    // --- mode 1 with iq* = 48
    sw = 10'd0; press(0);
    check(led[8:7] == 2'd1, "mode 1");
    sw = 10'b1_0011; repeat (3) press(0);
    periods(5);
    check(n_polar > 0 && mm != 10'd64, $sformatf("current loop drives m* (%0d)", mm));
    // --- mode 2
    sw = 10'd0; press(0);
    check(led[8:7] == 2'd2, "mode 2");
    sw = 10'b1_0100; repeat (2) press(0);
    periods(5);
    check(dut.iq_ref != 0, "speed loop sets iq*");
    // --- over-current, soft restart
    ain[3] = 12'd1900;
    periods(1);
    check(led[0], "over-current flagged"); n_oc += led[0];
    ain[3] = 12'd100;
    periods(4);
    check(led[6:4] == 3'b000, "switched off after error");
    press(2);
    check(!led[0] && led[8:7] == 2'd2, "soft restart keeps parameters"); n_soft += !led[0];
    // --- encoder error, full restart
    @(posedge clk); enc_run = 0; repeat (100) @(posedge clk);
    {enc_b, enc_a} = ~{enc_b, enc_a}; repeat (200) @(posedge clk);
    check(led[2], "encoder error flagged"); n_encerr += led[2];
    press(2);
    check(!led[2] && led[8:7] == 2'd0, "full restart resets parameters"); n_full += (led[8:7] == 0);
    enc_run = 1;
    periods(2);
    // --- mechanism census
    check(n_col_up >= 3, $sformatf("power-up steps %0d", n_col_up));
    check(n_col_down >= 3, $sformatf("power-down steps %0d", n_col_down));
    check(n_mode_sw >= 3, $sformatf("mode switches %0d", n_mode_sw));
    check(n_disp > 0, "display refreshes");
    check(n_oc > 0 && n_soft > 0, "over-current and soft restart");
    check(n_encerr > 0 && n_full > 0, "encoder error and full restart");
    check(n_ol_step > 0, "open-loop rotation");
    $display("mechanisms: valid=%0d polar=%0d up=%0d down=%0d blank=%0d modes=%0d disp=%0d oc=%0d soft=%0d encerr=%0d full=%0d",
             n_valid, n_polar, n_col_up, n_col_down, n_blank, n_mode_sw, n_disp, n_oc, n_soft, n_encerr, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
