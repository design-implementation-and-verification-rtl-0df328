// mac_pkg: constants and types shared by the control system of a three-phase
// four-level active-clamped (MAC) inverter driving a permanent-magnet motor.
//
// The time unit (TU) is one period of the 50 MHz system clock (20 ns). The
// blanking time (40 TU), delay time (2 TU), switching period (10000 TU), the
// encoder resolution (4096 edges per turn, 4 pole pairs, index offset 385
// edges) and the 12-bit ADC resolution follow the design description. The
// fixed-point formats below (angle of 1024 steps per electrical turn, 13-bit
// sine/cosine, 10-bit duty commands) are this design's choices, sized so that
// a 1024-entry sine table and 10-bit duty inputs match the described memories.
package mac_pkg;

  // ---------------- time base (in TU = clock cycles of 50 MHz) ------------
  localparam int unsigned CLK_HZ        = 50_000_000;
  localparam int unsigned TS_TU         = 10_000;   // switching period, 200 us
  localparam int unsigned TB_TU         = 40;       // blanking time, 800 ns
  localparam int unsigned TD_TU         = 2;        // delay time, 40 ns
  localparam int unsigned ADC_SCLK_DIV  = 4;        // 12.5 MHz ADC clock
  localparam int unsigned ENC_SMP_DIV   = 8;        // 6.25 MHz encoder sampling
  localparam int unsigned ENC_STABLE    = 8;        // equal samples required
  localparam int unsigned SPEED_TU      = 125_000;  // 2.5 ms speed window
  localparam int unsigned BTN_TU        = 2_000_000;// 25 Hz button sampling
  localparam int unsigned DISP_TU       = 16_666_667;// 3 Hz display refresh

  // ---------------- encoder / motor ---------------------------------------
  localparam int unsigned ENC_EDGES     = 4096;     // edges per mechanical turn
  localparam int unsigned ANGLE_OFFSET  = 385;      // c_angle_offset, in edges
  localparam int unsigned POLE_PAIRS    = 4;

  // ---------------- widths -------------------------------------------------
  localparam int ADC_W   = 12;  // ADC sample, two's complement
  localparam int ANG_W   = 10;  // electrical angle, 1024 steps per turn
  localparam int TRIG_W  = 13;  // sine / cosine, signed, scale 4095
  localparam int DQ_W    = 14;  // id, iq
  localparam int SPD_W   = 16;  // speed, 1 LSB = 60/(4*2.5ms*4096) rpm
  localparam int DUTY_W  = 10;  // dd*, dq*, signed
  localparam int MOD_W   = 10;  // m*, unsigned
  localparam int K_W     = 12;  // k2, k3, signed
  localparam int PAR_W   = 16;  // user parameters
  localparam int CNT_W   = 14;  // counters inside a switching period

  typedef logic signed [ADC_W-1:0] adc_t;
  typedef logic        [ANG_W-1:0] angle_t;

  // Sampled analog variables, named as in the converter: dc-link capacitor
  // voltages from the lowest (v21) to the highest (v43), two phase currents.
  typedef struct packed {
    adc_t v21;
    adc_t v32;
    adc_t v43;
    adc_t ia;
    adc_t ib;
  } adc_frame_t;

  // Operation modes: number of closed loops around the modulator.
  typedef enum logic [1:0] {
    MODE_OPEN    = 2'd0,   // fixed-frequency open loop, m* from the user
    MODE_CURRENT = 2'd1,   // current loop, iq* from the user
    MODE_SPEED   = 2'd2    // speed loop, iq* from the speed compensator
  } mode_e;

  // Gate bit order of one leg (Fig. 4 naming). Column 1 is next to the
  // dc-link terminals (6 devices), column 3 next to the output (2 devices).
  localparam int G_SN11 = 0;  // c1
  localparam int G_SP13 = 1;  // not c1
  localparam int G_SN22 = 2;  // c2
  localparam int G_SP22 = 3;  // not c2
  localparam int G_SN33 = 4;  // c3
  localparam int G_SP31 = 5;  // not c3
  localparam int G_SN21 = 6;  // c2
  localparam int G_SP12 = 7;  // not c1
  localparam int G_SN32 = 8;  // c3
  localparam int G_SP21 = 9;  // not c2
  localparam int G_SN31 = 10; // c3
  localparam int G_SP11 = 11; // not c1

  // Gate word of one leg from the three control variables c1..c3.
  function automatic logic [11:0] gates_from_c(input logic [2:0] c);
    logic [11:0] g;
    g[G_SN11] =  c[0];  g[G_SP13] = ~c[0];
    g[G_SN22] =  c[1];  g[G_SP22] = ~c[1];
    g[G_SN33] =  c[2];  g[G_SP31] = ~c[2];
    g[G_SN21] =  c[1];  g[G_SP12] = ~c[0];
    g[G_SN32] =  c[2];  g[G_SP21] = ~c[1];
    g[G_SN31] =  c[2];  g[G_SP11] = ~c[0];
    return g;
  endfunction

  // Control variables that connect the output to dc-link terminal k (1..4):
  // c_j = 0 for j < k, c_j = 1 for j >= k.
  function automatic logic [2:0] c_from_level(input logic [1:0] lvl0);
    // lvl0 = k - 1
    logic [2:0] c;
    for (int j = 1; j <= 3; j++) c[j-1] = (j >= int'(lvl0) + 1);
    return c;
  endfunction

  // Column membership mask of the 12 gates (1 = column 1 etc.).
  localparam logic [11:0] COL1_MASK = 12'b0000_0011_1111;
  localparam logic [11:0] COL2_MASK = 12'b0011_1100_0000;
  localparam logic [11:0] COL3_MASK = 12'b1100_0000_0000;


  // sin(2*pi*n/N) in Q2.30 fixed point, evaluated at elaboration time by a
  // Taylor series on the first quadrant (used to fill the sine and tangent
  // tables; error well below one LSB of a 13-bit result). N must be a
  // multiple of 4.
  function automatic longint isin_q30(input longint n_in, input longint n_full);
    longint n, q, r, x, term, sum;
    n = n_in % n_full;
    if (n < 0) n = n + n_full;
    q = n / (n_full / 4);
    r = n % (n_full / 4);
    if (q == 1 || q == 3) r = n_full / 4 - r;
    // x = 2*pi*r/N in Q30 (2*pi*2^30 = 6746518852)
    x = (r * 64'sd6746518852) / n_full;
    term = x;
    sum  = x;
    for (int k = 1; k <= 7; k++) begin
      term = -(((term * x) >>> 30) * x >>> 30) / (2 * k * (2 * k + 1));
      sum  = sum + term;
    end
    if (q >= 2) sum = -sum;
    return sum;
  endfunction

endpackage
