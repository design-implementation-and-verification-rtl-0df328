// current_controller: the two inner current loops of the field-oriented
// control, with the cross-coupling (decoupling) terms of the PMSM model.
//
//   dd* = PI_d(id* - id) - K * w * iq / Vdc
//   dq* = PI_q(iq* - iq) + K * w * id / Vdc
//
// id* is 0. The decoupling gain sqrt(2)*we*L/Vdc of the control diagram is
// formed from the measured speed w (speed_meter LSB), the dc-link voltage
// Vdc = v21 + v32 + v43 (ADC LSB) and the constant KDEC / 2^KDEC_SHIFT,
// which folds in sqrt(2), the 7.5 mH winding inductance, the 4 pole pairs
// (0.6136 rad/s electrical per speed LSB),
// and the current (6.1 mA/LSB), voltage (0.108 V/LSB) and duty (512 = 1)
// scales: 512*sqrt(2)*0.6136*0.0075*0.0061/0.108 * 2^16 = 12337. The two
// divisions by Vdc run bit-serially. The loop structure and the decoupling
// formula, the inductance and the sensor resolutions follow the
// description; the duty scale and the signs of the
// decoupling terms (taken from the motor voltage equations) are this
// design's.
//
// Timing: `start` with new id, iq; dd, dq and `valid` follow NW+3 = 47
// cycles later. Below VDC_MIN the decoupling terms are zero.
module current_controller
  import mac_pkg::*;
#(
  parameter int KDEC       = 12337,
  parameter int KDEC_W     = 14,
  parameter int KDEC_SHIFT = 16,
  parameter int VDC_MIN    = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     clear,
  input  logic signed [DQ_W-1:0]   id,
  input  logic signed [DQ_W-1:0]   iq,
  input  logic signed [DQ_W-1:0]   iq_ref,
  input  logic signed [SPD_W-1:0]  speed,
  input  logic [ADC_W+1:0]         vdc,
  input  logic [7:0]               kp,
  input  logic [7:0]               ki,
  output logic signed [DUTY_W-1:0] dd,
  output logic signed [DUTY_W-1:0] dq,
  output logic                     valid
);
  localparam int NW = DQ_W + SPD_W + KDEC_W;   // |i| * |w| * KDEC
  localparam int VW = ADC_W + 2;

  logic signed [DUTY_W-1:0] dd_raw, dq_raw;
  logic [NW-1:0] num_d, num_q, quo_d, quo_q;
  logic done_d, done_q, busy_d, busy_q;
  logic neg_d, neg_q, vdc_ok;

  pi_compensator #(.IN_W(DQ_W), .OUT_W(DUTY_W), .KP_SHIFT(4), .KI_SHIFT(7)) u_pi_d (
    .clk, .rst_n, .en(start), .clear, .ref_in('0), .fb(id), .kp, .ki, .y(dd_raw), .valid());
  pi_compensator #(.IN_W(DQ_W), .OUT_W(DUTY_W), .KP_SHIFT(4), .KI_SHIFT(7)) u_pi_q (
    .clk, .rst_n, .en(start), .clear, .ref_in(iq_ref), .fb(iq), .kp, .ki, .y(dq_raw), .valid());

  function automatic logic [NW-1:0] mag_prod(input logic signed [DQ_W-1:0] i,
                                             input logic signed [SPD_W-1:0] w);
    logic [DQ_W-1:0]  ai;
    logic [SPD_W-1:0] aw;
    ai = i[DQ_W-1] ? DQ_W'(-i) : DQ_W'(i);
    aw = w[SPD_W-1] ? SPD_W'(-w) : SPD_W'(w);
    return NW'(ai) * NW'(aw) * NW'(KDEC);
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      num_d <= '0; num_q <= '0; neg_d <= 1'b0; neg_q <= 1'b0; vdc_ok <= 1'b0;
    end else if (start) begin
      num_d  <= mag_prod(id, speed);
      num_q  <= mag_prod(iq, speed);
      neg_d  <= id[DQ_W-1] ^ speed[SPD_W-1];
      neg_q  <= iq[DQ_W-1] ^ speed[SPD_W-1];
      vdc_ok <= (vdc >= VW'(VDC_MIN));
    end

  logic div_go;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) div_go <= 1'b0;
    else        div_go <= start;

  seq_divider #(.NW(NW), .DW(VW)) u_div_d (.clk, .rst_n, .start(div_go), .num(num_d), .den(vdc),
                                           .quot(quo_d), .done(done_d), .busy(busy_d));
  seq_divider #(.NW(NW), .DW(VW)) u_div_q (.clk, .rst_n, .start(div_go), .num(num_q), .den(vdc),
                                           .quot(quo_q), .done(done_q), .busy(busy_q));

  function automatic logic signed [DUTY_W+1:0] term(input logic [NW-1:0] quo, input logic neg,
                                                   input logic ok);
    logic [NW-1:0] t;
    logic signed [DUTY_W+1:0] s;
    t = quo >> KDEC_SHIFT;
    if (!ok) t = '0;
    if (t > NW'((1 << DUTY_W) - 1)) t = NW'((1 << DUTY_W) - 1);
    s = (DUTY_W + 2)'(t);
    return neg ? -s : s;
  endfunction

  function automatic logic signed [DUTY_W-1:0] sat(input logic signed [DUTY_W+2:0] v);
    localparam logic signed [DUTY_W+2:0] MX = (1 <<< (DUTY_W - 1)) - 1;
    if (v > MX)       return DUTY_W'(MX);
    else if (v < -MX) return DUTY_W'(-MX);
    else              return DUTY_W'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      dd <= '0; dq <= '0; valid <= 1'b0;
    end else begin
      valid <= done_d & done_q;
      if (done_d & done_q) begin
        dd <= sat((DUTY_W + 3)'(dd_raw) - (DUTY_W + 3)'(term(quo_q, neg_q, vdc_ok)));
        dq <= sat((DUTY_W + 3)'(dq_raw) + (DUTY_W + 3)'(term(quo_d, neg_d, vdc_ok)));
      end
    end

  // the two dividers are started together and must finish together
  assert property (@(posedge clk) disable iff (!rst_n) done_d == done_q);
  wire unused_busy = busy_d ^ busy_q;
endmodule
