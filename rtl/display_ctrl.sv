// display_ctrl: slow refresh of the four 7-segment digits.
//
// Every REFRESH_TU cycles (3 Hz by default) the 16-bit value selected by
// `sel` out of NVAL inputs is latched and shown as four hexadecimal digits,
// each decoded by hexa_nss; between refreshes the digits stay still, so a
// person can read them. The refresh rate, the hexadecimal display and the
// choice among mode, editable and read-only values follow the description;
// the selection by index and the 16-bit width are this design's choices.
// Values that come straight from the ADC shift registers may be caught
// mid-transfer, as the description notes.
module display_ctrl #(
  parameter int          NVAL       = 16,
  parameter int unsigned REFRESH_TU = mac_pkg::DISP_TU
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [15:0]             vals [NVAL],
  input  logic [$clog2(NVAL)-1:0] sel,
  output logic [15:0]             shown,
  output logic [6:0]              hex_n [4]   // digit 3 is the most significant
);
  logic [$clog2(REFRESH_TU)-1:0] div;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      div <= '0; shown <= '0;
    end else if (div == $bits(div)'(REFRESH_TU - 1)) begin
      div   <= '0;
      shown <= vals[sel];
    end else div <= div + 1'b1;

  for (genvar d = 0; d < 4; d++) begin : g_dig
    hexa_nss u_dec (.hex(shown[4*d +: 4]), .seg_n(hex_n[d]));
  end
endmodule
