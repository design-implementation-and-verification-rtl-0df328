// pi_compensator: saturating proportional-integral compensator.
//
// On each `en` pulse: e = ref - fb,
//   integ <= clamp(integ + (ki * e) >>> KI_SHIFT, +-OUT_MAX)
//   y     <= clamp((kp * e) >>> KP_SHIFT + integ_new, +-OUT_MAX)
// Gains are unsigned and set at run time from the user interface. Clamping
// the integrator to the output range is the anti-windup. `clear` empties
// the integrator and the output. The same module is the speed compensator
// and each of the two current compensators. That these are PI controllers
// follows the description; the number formats, shifts and the anti-windup
// are this design's choices.
//
// Timing: y is registered, valid one cycle after `en`.
module pi_compensator #(
  parameter int IN_W     = 16,
  parameter int OUT_W    = 10,
  parameter int G_W      = 8,
  parameter int KP_SHIFT = 4,
  parameter int KI_SHIFT = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    clear,
  input  logic signed [IN_W-1:0]  ref_in,
  input  logic signed [IN_W-1:0]  fb,
  input  logic [G_W-1:0]          kp,
  input  logic [G_W-1:0]          ki,
  output logic signed [OUT_W-1:0] y,
  output logic                    valid
);
  localparam int AW = IN_W + G_W + 3;
  localparam logic signed [AW-1:0] OMAX = (AW'(1) <<< (OUT_W - 1)) - 1;

  logic signed [OUT_W-1:0] integ;
  logic signed [AW-1:0] e, p, i_inc, i_new, y_new;

  function automatic logic signed [AW-1:0] clamp(input logic signed [AW-1:0] v);
    if (v > OMAX)       return OMAX;
    else if (v < -OMAX) return -OMAX;
    else                return v;
  endfunction

  always_comb begin
    e     = AW'(ref_in) - AW'(fb);
    p     = (e * $signed({1'b0, kp})) >>> KP_SHIFT;
    i_inc = (e * $signed({1'b0, ki})) >>> KI_SHIFT;
    i_new = clamp(AW'(integ) + i_inc);
    y_new = clamp(p + i_new);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      integ <= '0; y <= '0; valid <= 1'b0;
    end else begin
      valid <= en;
      if (clear) begin
        integ <= '0; y <= '0;
      end else if (en) begin
        integ <= OUT_W'(i_new);
        y     <= OUT_W'(y_new);
      end
    end
endmodule
