// dclink_balance: proportional compensators that keep the three series
// dc-link capacitor voltages equal.
//
//   k2 = KP3 * ( 0 - (v21 - (v32 + v43)/2) )   (lowest capacitor vs the mean of the others)
//   k3 = KP3 * ( 0 - ((v21 + v32)/2 - v43) )   (highest capacitor vs the mean of the others)
//
// The two error expressions, with a zero reference, are those of the
// control diagram. Only the proportional term exists, as in the described implementation,
// so a small steady error remains. kp3 is a run-time gain (0..255; the
// reference measurements ran it from 0 to 64 stably and found it unstable at 80).
// k2 and k3 feed the modulator, which scales the inner-level duty ratios
// with them. The output scaling (>>> K_SHIFT) and the saturation are this
// design's choices.
//
// Timing: registered, valid one cycle after `en`.
module dclink_balance
  import mac_pkg::*;
#(
  parameter int K_SHIFT = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  adc_t                  v21,
  input  adc_t                  v32,
  input  adc_t                  v43,
  input  logic [7:0]            kp3,
  output logic signed [K_W-1:0] k2,
  output logic signed [K_W-1:0] k3,
  output logic                  valid
);
  localparam int W = ADC_W + 12;
  logic signed [W-1:0] e2, e3, p2, p3;

  function automatic logic signed [K_W-1:0] sat(input logic signed [W-1:0] v);
    localparam logic signed [W-1:0] MX = (1 <<< (K_W - 1)) - 1;
    if (v > MX)       return K_W'(MX);
    else if (v < -MX) return K_W'(-MX);
    else              return K_W'(v);
  endfunction

  always_comb begin
    // errors in half-LSB units to keep the /2 exact
    e2 = 2 * W'(v21) - W'(v32) - W'(v43);
    e3 = W'(v21) + W'(v32) - 2 * W'(v43);
    p2 = (-e2 * $signed({1'b0, kp3})) >>> (K_SHIFT + 1);
    p3 = (-e3 * $signed({1'b0, kp3})) >>> (K_SHIFT + 1);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      k2 <= '0; k3 <= '0; valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        k2 <= sat(p2);
        k3 <= sat(p3);
      end
    end
endmodule
