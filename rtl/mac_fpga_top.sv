// mac_fpga_top: FPGA control system of a three-phase four-level
// active-clamped inverter driving a permanent-magnet synchronous motor.
//
// Once per switching period (10000 cycles of 50 MHz, 200 us) the six-channel
// simultaneous ADC samples the three dc-link capacitor voltages and two
// phase currents. The currents are turned into id, iq with the encoder's
// electrical angle; two PI current loops with decoupling give the duty
// vector (dd*, dq*), which the polar converter turns into the modulation
// index m* and the reference angle theta*. In parallel the dc-link balance
// compensators give k2, k3 and the power-flow sign is formed. An outer speed
// loop (mode 2) sets iq*; in mode 1 the user sets iq*; in mode 0 (open loop)
// the angle turns at a fixed frequency and m* is the user's.
//
// The modulator that turns (m*, theta*, k2, k3, pow) into the leg duty
// ratios ("nearest-three virtual-space-vector" PWM) is not part of this
// RTL: its outputs enter as mod_thr, three level thresholds per leg within
// the period's triangular carrier, and m*, theta*, k2, k3, pow and the
// period tick leave as ports. The three phase generators turn the levels
// into 36 gate signals with blanking, gated by the column enables of the
// power-up/down sequencer, which also holds the error flags.
// The user interface has 10 switches, 3 buttons, 10 LEDs and four
// 7-segment digits: switches [3:0] pick the parameter to edit or the value
// to show, switch 4 makes the buttons step by 16; button 0 increments,
// button 1 decrements, button 2 switches the converter on/off or, after an
// error, restarts. LEDs: [2:0] errors {encoder, over-voltage,
// over-current}, [3] converter fully on, [6:4] column enables, [8:7] mode,
// [9] encoder index seen.
// Parameters (switch index): 0 mode, 1 open-loop m*, 2 delta_fit_0,
// 3 iq* (mode 1), 4 speed* (mode 2, 1.465 rpm/LSB), 5 kp_i, 6 ki_i, 7 kp_w,
// 8 ki_w, 9 kp3. Shown values 10..15: speed, v21, v32, v43, ia, ib.
// ADC_PARALLEL selects the parallel (1) or three-line serial (0) ADC link;
// the pin the chosen link does not use is held constant (SCLK high in
// parallel mode, RD low in serial mode).
module mac_fpga_top
  import mac_pkg::*;
#(
  parameter bit          ADC_PARALLEL = 1'b1,
  parameter int unsigned TS           = TS_TU,
  parameter int unsigned TB           = TB_TU,
  parameter int unsigned TD           = TD_TU,
  parameter int unsigned SPEED_WIN    = SPEED_TU,
  parameter int unsigned BTN_SMP      = BTN_TU,
  parameter int unsigned DISP_REFRESH = DISP_TU,
  parameter int unsigned STEP_TU      = TS_TU
) (
  input  logic        clk,
  input  logic        rst_n,
  // encoder
  input  logic        enc_a,
  input  logic        enc_b,
  input  logic        enc_index,
  // ADC (AD7656): serial mode uses adc_sclk and adc_db[10:8] as DOUT A..C,
  // parallel mode uses adc_rd_n and adc_db[11:0]
  output logic        adc_convst,
  output logic        adc_reset,
  output logic        adc_cs_n,
  output logic        adc_sclk,
  output logic        adc_rd_n,
  input  logic        adc_busy,
  input  logic [11:0] adc_db,
  // user interface
  input  logic [2:0]  btn_n,
  input  logic [9:0]  sw,
  output logic [9:0]  led,
  output logic [6:0]  hex_n [4],
  // modulator interface
  output logic                     mod_tick,
  output logic [MOD_W-1:0]         mod_m,
  output angle_t                   mod_theta,
  output logic signed [K_W-1:0]    mod_k2,
  output logic signed [K_W-1:0]    mod_k3,
  output logic                     mod_pow,
  input  logic [$clog2(TS)-1:0]    mod_thr [3][3],   // [leg][threshold]
  // gate drivers: [leg][device], device order as in mac_pkg
  output logic [11:0]              gates [3]
);
  localparam int CW = $clog2(TS);

  // ---------------- reset, including the full restart ----------------
  logic full_restart;
  logic [1:0] rhold;
  logic rst_i_n;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)            rhold <= 2'd3;
    else if (full_restart) rhold <= 2'd3;
    else if (rhold != 0)   rhold <= rhold - 1'b1;
  assign rst_i_n = rst_n && (rhold == 2'd0);

  // ---------------- time base ----------------
  logic tick;
  logic [CW-1:0] pcount, carrier;
  switching_period #(.TS(TS)) u_period (.clk, .rst_n(rst_i_n), .tick, .count(pcount), .carrier);

  // ---------------- encoder ----------------
  logic [2:0] enc_f;
  logic [11:0] position;
  angle_t phi;
  logic e_up, e_dn, enc_err, index_seen;
  logic signed [SPD_W-1:0] speed;
  logic speed_valid;

  encoder_filter u_encf (.clk, .rst_n(rst_i_n), .enc_raw({enc_index, enc_b, enc_a}), .enc_filt(enc_f));
  quadrature_counter u_qc (.clk, .rst_n(rst_i_n), .enc(enc_f), .position, .phi,
                           .edge_up(e_up), .edge_dn(e_dn), .enc_err, .index_seen);
  speed_meter #(.WIN_TU(SPEED_WIN)) u_speed (.clk, .rst_n(rst_i_n), .edge_up(e_up), .edge_dn(e_dn),
                                             .speed, .speed_valid);

  // ---------------- ADC ----------------
  adc_frame_t adc;
  logic adc_valid, adc_busy_if;
  if (ADC_PARALLEL) begin : g_par
    adc_parallel_if u_adc (.clk, .rst_n(rst_i_n), .start(tick), .adc_convst, .adc_reset, .adc_cs_n,
                           .adc_rd_n, .adc_busy, .adc_db, .frame(adc), .valid(adc_valid),
                           .busy(adc_busy_if));
    assign adc_sclk = 1'b1;
  end else begin : g_ser
    adc_serial_if u_adc (.clk, .rst_n(rst_i_n), .start(tick), .adc_convst, .adc_reset, .adc_cs_n,
                         .adc_sclk, .adc_busy, .adc_dout(adc_db[10:8]), .frame(adc),
                         .valid(adc_valid), .busy(adc_busy_if));
    assign adc_rd_n = 1'b0;   // tied low in serial mode
  end

  // ---------------- user interface ----------------
  localparam int NPAR = 10;
  localparam logic [15:0] PRESET [NPAR] = '{16'd0, 16'd0, 16'd41, 16'd0, 16'd0,
                                            16'd16, 16'd4, 16'd8, 16'd2, 16'd16};
  logic [2:0] press;
  logic [15:0] par [NPAR];
  logic sel_is_par;

  button_sampler #(.N(3), .SMP_TU(BTN_SMP)) u_btn (.clk, .rst_n, .btn_n, .press);
  assign sel_is_par = (sw[3:0] < 4'(NPAR));
  param_regs #(.NPAR(NPAR), .RESET_VALS(PRESET)) u_par (
    .clk, .rst_n(rst_i_n), .sel(sel_is_par ? sw[3:0] : 4'd15), .up(press[0]), .down(press[1]),
    .coarse(sw[4]), .par);

  mode_e mode;
  assign mode = (par[0][1:0] == 2'd1) ? MODE_CURRENT : (par[0][1:0] == 2'd2) ? MODE_SPEED : MODE_OPEN;

  // ---------------- system state and errors ----------------
  logic [3:0] estat;
  logic [2:0] err_flags;
  logic error;
  system_fsm #(.STEP_TU(STEP_TU)) u_sys (
    .clk, .rst_n(rst_i_n), .on_toggle(press[2] & ~error), .restart(press[2] & error),
    .adc_valid, .adc, .enc_err, .estat, .err_flags, .error, .full_restart);

  // ---------------- control chain ----------------
  logic signed [DQ_W-1:0] id, iq, iq_ref;
  logic cp_valid, cc_valid, pc_valid, pc_busy, loops_clear, k_valid;
  logic signed [DUTY_W-1:0] dd, dq;
  logic [MOD_W-1:0] m_polar;
  angle_t theta_polar;
  logic [ADC_W+1:0] vdc;

  always_comb begin
    logic signed [ADC_W+2:0] s;
    s   = (ADC_W + 3)'(adc.v21) + (ADC_W + 3)'(adc.v32) + (ADC_W + 3)'(adc.v43);
    vdc = s[ADC_W+2] ? '0 : (ADC_W + 2)'(s);
  end

  clarke_park u_cp (.clk, .rst_n(rst_i_n), .start(adc_valid), .ia(adc.ia), .ib(adc.ib), .phi,
                    .id, .iq, .valid(cp_valid));

  current_controller u_cc (.clk, .rst_n(rst_i_n), .start(cp_valid), .clear(loops_clear), .id, .iq,
                           .iq_ref, .speed, .vdc, .kp(par[5][7:0]), .ki(par[6][7:0]),
                           .dd, .dq, .valid(cc_valid));

  polar_converter u_pc (.clk, .rst_n(rst_i_n), .start(cc_valid), .dd, .dq, .phi,
                        .m(m_polar), .theta(theta_polar), .valid(pc_valid), .busy(pc_busy));

  dclink_balance u_dcl (.clk, .rst_n(rst_i_n), .en(adc_valid), .v21(adc.v21), .v32(adc.v32),
                        .v43(adc.v43), .kp3(par[9][7:0]), .k2(mod_k2), .k3(mod_k3), .valid(k_valid));

  setpoint_manager u_sp (
    .clk, .rst_n(rst_i_n), .tick, .mode, .m_user(par[1][MOD_W-1:0]), .delta_fit_0(par[2][7:0]),
    .iq_user(par[3][DQ_W-1:0]), .speed_ref(par[4]), .speed, .speed_valid,
    .kp_w(par[7][7:0]), .ki_w(par[8][7:0]), .m_polar, .theta_polar, .dd, .dq, .id, .iq,
    .iq_ref, .m_star(mod_m), .theta_star(mod_theta), .pow(mod_pow), .loops_clear);

  assign mod_tick = tick;

  // ---------------- phase generators ----------------
  for (genvar l = 0; l < 3; l++) begin : g_leg
    phase_generator #(.TS(TS), .TB(TB), .TD(TD)) u_pg (
      .clk, .rst_n(rst_i_n), .tick, .carrier, .thr(mod_thr[l]), .col_en(estat[3:1]),
      .level(), .gates(gates[l]));
  end

  // ---------------- display and LEDs ----------------
  logic [15:0] vals [16];
  logic [15:0] shown;
  always_comb begin
    for (int i = 0; i < NPAR; i++) vals[i] = par[i];
    vals[10] = 16'(speed);
    vals[11] = 16'(adc.v21);
    vals[12] = 16'(adc.v32);
    vals[13] = 16'(adc.v43);
    vals[14] = 16'(adc.ia);
    vals[15] = 16'(adc.ib);
  end
  display_ctrl #(.NVAL(16), .REFRESH_TU(DISP_REFRESH)) u_disp (
    .clk, .rst_n(rst_i_n), .vals, .sel(sw[3:0]), .shown, .hex_n);

  assign led = {index_seen, par[0][1:0], estat[3:1], estat[0], err_flags};
endmodule
