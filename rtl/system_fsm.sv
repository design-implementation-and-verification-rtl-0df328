// system_fsm: converter power-up / power-down sequencer and error handler.
//
// The inverter cannot be switched on or off all at once: its device columns
// must be enabled in order. estat (the "system state") carries the column
// enables in its upper bits: bit 3 enables the column next to the dc link
// (6 devices per leg), bit 2 the middle column, bit 1 the column next to the
// output; bit 0 says the converter is fully on. The sequence is
//   off 0000 -> 1000 -> 1100 -> 1110 -> on 1111
// and the reverse for switching off, one step every STEP_TU cycles.
//
// Errors are sticky: over-current (|ia|, |ib| or |ic| = |ia+ib| above
// I_LIM), over-voltage (any capacitor voltage above V_LIM) and encoder
// error. Any error starts the switch-off sequence and blocks switching on.
// A `restart` request clears the errors: if only over-current and/or
// over-voltage are present it is a soft restart (flags cleared, everything
// else kept); otherwise `full_restart` pulses to reset the whole system.
// Column meaning, ordered switching, sticky errors and soft/full restart
// follow the description; the order of the steps (outer column first), the
// step time and the limits are this design's choices.
module system_fsm
  import mac_pkg::*;
#(
  parameter int unsigned STEP_TU = TS_TU,
  parameter int          I_LIM   = 1638,   // 10 A at 6.1 mA/LSB
  parameter int          V_LIM   = 833     // 90 V at 0.108 V/LSB
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       on_toggle,     // request on / off
  input  logic       restart,       // clear errors
  input  logic       adc_valid,
  input  adc_frame_t adc,
  input  logic       enc_err,
  output logic [3:0] estat,
  output logic [2:0] err_flags,     // {encoder, over-voltage, over-current}
  output logic       error,
  output logic       full_restart
);
  typedef enum logic [2:0] {S_OFF, S_UP1, S_UP2, S_UP3, S_ON, S_DN3, S_DN2, S_DN1} st_e;
  st_e st;
  logic [$clog2(STEP_TU)-1:0] t;
  logic want_on;
  logic oc, ov;

  function automatic logic [ADC_W:0] absv(input logic signed [ADC_W:0] v);
    return v[ADC_W] ? -v : v;
  endfunction

  always_comb begin
    logic signed [ADC_W:0] ic;
    ic = -((ADC_W + 1)'(adc.ia) + (ADC_W + 1)'(adc.ib));
    oc = (absv((ADC_W + 1)'(adc.ia)) > (ADC_W + 1)'(I_LIM)) ||
         (absv((ADC_W + 1)'(adc.ib)) > (ADC_W + 1)'(I_LIM)) ||
         (absv(ic) > (ADC_W + 1)'(I_LIM));
    ov = (adc.v21 > adc_t'(V_LIM)) || (adc.v32 > adc_t'(V_LIM)) || (adc.v43 > adc_t'(V_LIM));
  end

  assign error = |err_flags;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      err_flags <= '0; want_on <= 1'b0; full_restart <= 1'b0;
    end else begin
      full_restart <= 1'b0;
      if (adc_valid && oc) err_flags[0] <= 1'b1;
      if (adc_valid && ov) err_flags[1] <= 1'b1;
      if (enc_err)         err_flags[2] <= 1'b1;
      if (restart && error) begin
        if (err_flags[2]) full_restart <= 1'b1;
        else              err_flags    <= '0;
      end
      if (on_toggle && !error) want_on <= ~want_on;
      if (error) want_on <= 1'b0;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= S_OFF; t <= '0;
    end else begin
      if (st == S_OFF || st == S_ON) t <= '0;
      else if (t == $bits(t)'(STEP_TU - 1)) t <= '0;
      else t <= t + 1'b1;
      unique case (st)
        S_OFF: if (want_on) st <= S_UP1;
        S_UP1: if (!want_on) st <= S_DN1; else if (t == $bits(t)'(STEP_TU - 1)) st <= S_UP2;
        S_UP2: if (!want_on) st <= S_DN2; else if (t == $bits(t)'(STEP_TU - 1)) st <= S_UP3;
        S_UP3: if (!want_on) st <= S_DN3; else if (t == $bits(t)'(STEP_TU - 1)) st <= S_ON;
        S_ON:  if (!want_on) st <= S_DN3;
        S_DN3: if (t == $bits(t)'(STEP_TU - 1)) st <= S_DN2;
        S_DN2: if (t == $bits(t)'(STEP_TU - 1)) st <= S_DN1;
        S_DN1: if (t == $bits(t)'(STEP_TU - 1)) st <= S_OFF;
        default: st <= S_OFF;
      endcase
    end

  always_comb
    unique case (st)
      S_UP1, S_DN1: estat = 4'b1000;
      S_UP2, S_DN2: estat = 4'b1100;
      S_UP3, S_DN3: estat = 4'b1110;
      S_ON:         estat = 4'b1111;
      default:      estat = 4'b0000;
    endcase

  // the column enables always form a thermometer code from bit 3 down
  assert property (@(posedge clk) disable iff (!rst_n)
    estat inside {4'b0000, 4'b1000, 4'b1100, 4'b1110, 4'b1111});
endmodule
