// polar_converter: dq -> alpha-beta conversion of the duty command, a
// Cartesian-to-polar conversion done by successive approximation.
//
//   m*     = sqrt(dd^2 + dq^2)
//   theta* = atan2(dd, dq) + phi
//
// Square root: the result r is built bit by bit from the MSB; a trial bit is
// kept when r*(r-1) <= dd^2 + dq^2. Comparing with r*(r-1) rather than r*r
// makes the result the square root rounded to nearest instead of truncated.
// Arctangent: with x = max(|dd|,|dq|) and y = min(|dd|,|dq|) the angle is in
// the first octant (y/x <= 1); an angle a of 7 bits (128 steps of 1/1024 of a
// turn) is built bit by bit, keeping a trial bit when x*tan(a) <= y, with
// tan(a) read from a 129-entry table (12 fractional bits). The octant and
// the signs of dd, dq then place the angle in the full turn, and the
// electrical angle phi is added modulo one turn. Both searches run side by
// side, one bit per cycle. Both algorithms and the reason for them (a
// two-input table would need 2^20 entries) follow the description; the
// angle format, the tangent table size and the argument order of atan2
// (first argument dd, second dq, as written in the description) are this
// design's reading.
//
// Timing: `start` latches the inputs; m, theta and `valid` follow 12 cycles
// later.
module polar_converter
  import mac_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic signed [DUTY_W-1:0] dd,
  input  logic signed [DUTY_W-1:0] dq,
  input  angle_t                   phi,
  output logic [MOD_W-1:0]         m,
  output angle_t                   theta,
  output logic                     valid,
  output logic                     busy
);
  localparam int AB  = ANG_W - 3;           // bits of the octant angle
  localparam int NT  = (1 << AB) + 1;
  localparam int TQ  = 12;                  // tangent fraction bits
  localparam int SW  = 2 * DUTY_W + 1;      // width of dd^2 + dq^2

  typedef logic [TQ:0] tan_t [NT];
  function automatic tan_t gen_tan();
    tan_t t;
    for (int a = 0; a < NT; a++) begin
      longint s, c;
      s = isin_q30(a, 1 << ANG_W);
      c = isin_q30(a + (1 << (ANG_W - 2)), 1 << ANG_W);
      t[a] = (TQ + 1)'(((s <<< TQ) + c / 2) / c);
    end
    return t;
  endfunction
  localparam tan_t TAN = gen_tan();

  logic [SW-1:0]        sumsq;
  logic [DUTY_W-1:0]    ax, ay;          // |dq|, |dd|
  logic                 sx, sy, swap;    // signs, |dd| > |dq|
  logic [DUTY_W-1:0]    xmax, ymin;
  angle_t               phi_l;
  logic [MOD_W-1:0]     r;
  logic [AB-1:0]        a;
  logic [3:0]           bitn;
  logic                 run;

  // trial values for the current bit
  logic [MOD_W-1:0] r_t;
  logic [AB-1:0]    a_t;
  logic [2*MOD_W-1:0] rr;
  logic [DUTY_W+TQ:0] xt;
  always_comb begin
    r_t = r;
    a_t = a;
    if (bitn < 4'(MOD_W)) r_t[MOD_W - 1 - bitn] = 1'b1;
    if (bitn < 4'(AB))    a_t[AB - 1 - bitn]    = 1'b1;
    rr = r_t * (r_t - 1'b1);
    xt = (DUTY_W + TQ + 1)'(xmax) * (DUTY_W + TQ + 1)'(TAN[a_t]);
  end

  function automatic logic [DUTY_W-1:0] mag(input logic signed [DUTY_W-1:0] v);
    return v[DUTY_W-1] ? DUTY_W'(-v) : DUTY_W'(v);
  endfunction

  logic [DUTY_W-1:0] mx, my;
  assign mx = mag(dq);
  assign my = mag(dd);

  // place the octant angle in the full turn
  angle_t full;
  always_comb begin
    angle_t q1;
    q1   = swap ? angle_t'((1 << (ANG_W - 2)) - a) : angle_t'(a);
    full = q1;
    if (sx && !sy)      full = angle_t'((1 << (ANG_W - 1))) - q1;
    else if (sx && sy)  full = angle_t'((1 << (ANG_W - 1))) + q1;
    else if (!sx && sy) full = angle_t'(0) - q1;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sumsq <= '0; ax <= '0; ay <= '0; sx <= 1'b0; sy <= 1'b0; swap <= 1'b0;
      xmax <= '0; ymin <= '0; phi_l <= '0; r <= '0; a <= '0; bitn <= '0; run <= 1'b0;
      m <= '0; theta <= '0; valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (start) begin
        ax <= mx; ay <= my;
        sumsq <= SW'(mx) * SW'(mx) + SW'(my) * SW'(my);
        sx <= dq[DUTY_W-1];
        sy <= dd[DUTY_W-1];
        swap <= (my > mx);
        xmax <= (my > mx) ? my : mx;
        ymin <= (my > mx) ? mx : my;
        phi_l <= phi;
        r <= '0; a <= '0; bitn <= '0; run <= 1'b1;
      end else if (run) begin
        if (bitn < 4'(MOD_W) && {1'b0, rr} <= (2 * MOD_W + 1)'(sumsq)) r <= r_t;
        if (bitn < 4'(AB) && xt <= ((DUTY_W + TQ + 1)'(ymin) << TQ)) a <= a_t;
        bitn <= bitn + 1'b1;
        if (bitn == 4'(MOD_W)) begin
          run   <= 1'b0;
          valid <= 1'b1;
          m     <= r;
          theta <= (ax == '0 && ay == '0) ? phi_l : full + phi_l;
        end
      end
    end

  assign busy = run;
endmodule
