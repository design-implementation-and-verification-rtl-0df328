// clarke_park: ab -> dq transformation of the two measured phase currents
// (the third follows from ia + ib + ic = 0, the motor has no neutral).
//
//   id = sqrt(2) * ( sin(phi + pi/3) * ia + sin(phi) * ib )
//   iq = sqrt(2) * ( cos(phi + pi/3) * ia + cos(phi) * ib )
//
// The sines and cosines come from two 1024-entry tables (phi and phi+60 deg),
// 13-bit signed with 4095 = 1.0. sqrt(2) is the constant 181/128. The
// result is saturated to DQ_W bits, in the same LSB as ia, ib. The matrix
// and the table layout follow the description; the constant and the
// rounding (arithmetic shift, i.e. toward minus infinity) are this design's.
//
// Timing: `start` latches ia, ib and phi; id, iq and `valid` appear two
// cycles later (one cycle of table read, one of arithmetic).
module clarke_park
  import mac_pkg::*;
#(
  parameter int DQ = DQ_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  adc_t                 ia,
  input  adc_t                 ib,
  input  angle_t               phi,
  output logic signed [DQ-1:0] id,
  output logic signed [DQ-1:0] iq,
  output logic                 valid
);
  localparam int SQRT2_NUM = 181;   // sqrt(2) ~ 181/128
  localparam int SHIFT     = 7 + 12;

  logic signed [12:0] s0, c0, s60, c60;
  adc_t ia_l, ib_l;
  logic phase1;

  sincos_rom #(.OFFSET_SIXTHS(0)) u_rom0  (.clk, .addr(phi), .sin_q(s0),  .cos_q(c0));
  sincos_rom #(.OFFSET_SIXTHS(1)) u_rom60 (.clk, .addr(phi), .sin_q(s60), .cos_q(c60));

  function automatic logic signed [DQ-1:0] sat(input logic signed [39:0] v);
    localparam logic signed [39:0] MX = (40'sd1 <<< (DQ - 1)) - 1;
    if (v > MX)       return DQ'(MX);
    else if (v < -MX) return DQ'(-MX);
    else              return DQ'(v);
  endfunction

  logic signed [39:0] acc_d, acc_q;
  always_comb begin
    acc_d = (40'(s60) * 40'(ia_l) + 40'(s0) * 40'(ib_l)) * SQRT2_NUM;
    acc_q = (40'(c60) * 40'(ia_l) + 40'(c0) * 40'(ib_l)) * SQRT2_NUM;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ia_l <= '0; ib_l <= '0; phase1 <= 1'b0; id <= '0; iq <= '0; valid <= 1'b0;
    end else begin
      phase1 <= start;
      valid  <= phase1;
      if (start) begin ia_l <= ia; ib_l <= ib; end
      if (phase1) begin
        id <= sat(acc_d >>> SHIFT);
        iq <= sat(acc_q >>> SHIFT);
      end
    end
endmodule
