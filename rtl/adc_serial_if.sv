// adc_serial_if: AD7656 six-channel simultaneous-sampling ADC, hardware
// serial mode with three data lines (DOUT A, B, C).
//
// On `start` (the start of a switching period) the module pulses CONVST so
// that all channels are sampled at the same instant, waits for BUSY to rise
// and fall, then lowers CS and runs 32 ADC clock periods at clk/SCLK_DIV
// (12.5 MHz). Each line carries two 16-bit words, MSB first, each a 12-bit
// two's-complement sample preceded by 4 zeros. The three 32-bit shift
// registers ARE the internal variables: as in the described implementation
// the samples are not copied into a second register, so a reader that is
// not synchronised to `valid` may see a word while it is being shifted.
// The first conversion after reset is discarded (the part ignores the
// RANGE pin on its first conversion), and the ADC RESET pin is pulsed after
// the FPGA reset.
// Channel use: A = v21, v32; B = v43, ia; C = ib, (spare). SCLK idles high;
// the ADC changes DOUT on SCLK falling edges and this module samples on the
// rising edges. The channel map, the edge convention and the reset pulse
// length are this design's choices; the rest follows the description.
//
// Timing: `valid` pulses one cycle after the last bit; from `start` that is
// CONV_TU + BUSY time + 32*SCLK_DIV + about 4 cycles.
module adc_serial_if
  import mac_pkg::*;
#(
  parameter int unsigned SCLK_DIV = ADC_SCLK_DIV,
  parameter int unsigned CONV_TU  = 2,     // CONVST high time
  parameter int unsigned RST_TU   = 8,     // ADC RESET pulse after FPGA reset
  parameter int unsigned BUSY_TO  = 64     // wait for BUSY to rise at most this
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  // ADC pins
  output logic       adc_convst,   // CONVST A (B, C tied to it)
  output logic       adc_reset,
  output logic       adc_cs_n,
  output logic       adc_sclk,
  input  logic       adc_busy,
  input  logic [2:0] adc_dout,     // {DOUT C, DOUT B, DOUT A}
  // samples
  output adc_frame_t frame,
  output logic       valid,
  output logic       busy          // a conversion/transfer is in progress
);
  typedef enum logic [2:0] {S_RESET, S_IDLE, S_CONV, S_WHI, S_WLO, S_SHIFT, S_END} st_e;
  st_e st;

  localparam int CW = 8;
  logic [CW-1:0] cnt;
  logic [$clog2(SCLK_DIV)-1:0] ph;
  logic [5:0] bits;
  logic [31:0] sh [3];
  logic first;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= S_RESET; cnt <= '0; ph <= '0; bits <= '0; first <= 1'b1;
      adc_convst <= 1'b0; adc_reset <= 1'b1; adc_cs_n <= 1'b1; adc_sclk <= 1'b1;
      valid <= 1'b0;
      for (int i = 0; i < 3; i++) sh[i] <= '0;
    end else begin
      valid <= 1'b0;
      unique case (st)
        S_RESET: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(RST_TU - 1)) begin adc_reset <= 1'b0; cnt <= '0; st <= S_IDLE; end
        end
        S_IDLE: if (start) begin adc_convst <= 1'b1; cnt <= '0; st <= S_CONV; end
        S_CONV: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(CONV_TU - 1)) begin adc_convst <= 1'b0; cnt <= '0; st <= S_WHI; end
        end
        S_WHI: begin
          cnt <= cnt + 1'b1;
          if (adc_busy || cnt == CW'(BUSY_TO - 1)) st <= S_WLO;
        end
        S_WLO: if (!adc_busy) begin
          adc_cs_n <= 1'b0; ph <= '0; bits <= '0; st <= S_SHIFT;
        end
        S_SHIFT: begin
          ph <= ph + 1'b1;
          if (ph == '0) adc_sclk <= 1'b0;
          else if (ph == $bits(ph)'(SCLK_DIV / 2)) begin
            adc_sclk <= 1'b1;   // rising edge: sample
            for (int i = 0; i < 3; i++) sh[i] <= {sh[i][30:0], adc_dout[i]};
            bits <= bits + 1'b1;
            if (bits == 6'd31) st <= S_END;
          end
          if (ph == $bits(ph)'(SCLK_DIV - 1)) ph <= '0;
        end
        S_END: if (ph == '0) begin       // CS rises half an ADC clock after the last rising edge
          adc_cs_n <= 1'b1;
          st       <= S_IDLE;
          first    <= 1'b0;
          valid    <= ~first;
        end else ph <= ph + 1'b1;
        default: st <= S_IDLE;
      endcase
    end

  assign busy = (st != S_IDLE);

  // the variables are taken straight from the shift registers
  assign frame.v21 = adc_t'(sh[0][27:16]);
  assign frame.v32 = adc_t'(sh[0][11:0]);
  assign frame.v43 = adc_t'(sh[1][27:16]);
  assign frame.ia  = adc_t'(sh[1][11:0]);
  assign frame.ib  = adc_t'(sh[2][27:16]);
endmodule
