// adc_parallel_if: AD7656-1 six-channel simultaneous-sampling ADC in
// hardware parallel word mode, for the board that replaces the serial
// connection with the 12-bit parallel bus (SER/PAR = 0, W/B = 0, H/S = 0).
//
// On `start` it pulses CONVST (A, B and C tied), waits for BUSY to rise and
// fall, then reads the conversion results with CS and RD low, one channel
// per read in channel order, NREAD words (5 used: v21, v32, v43, ia, ib).
// Each read holds RD low for RD_TU cycles and samples DB[11:0] in its last
// cycle, then RD high for RD_TU cycles. The samples go into registers that
// change only when a whole frame is in, then `valid` pulses. The first
// conversion after reset is discarded, as on the serial interface. The pin
// use follows the ADC pin table of the board; read timing, channel order
// and registering the frame are this design's choices.
//
// Timing: valid = CONV_TU + BUSY time + 2*RD_TU*NREAD + about 3 cycles after start.
module adc_parallel_if
  import mac_pkg::*;
#(
  parameter int unsigned CONV_TU = 2,
  parameter int unsigned RD_TU   = 2,
  parameter int unsigned RST_TU  = 8,
  parameter int unsigned BUSY_TO = 64,
  parameter int unsigned NREAD   = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        adc_convst,
  output logic        adc_reset,
  output logic        adc_cs_n,
  output logic        adc_rd_n,
  input  logic        adc_busy,
  input  logic [11:0] adc_db,
  output adc_frame_t  frame,
  output logic        valid,
  output logic        busy
);
  typedef enum logic [2:0] {S_RESET, S_IDLE, S_CONV, S_WHI, S_WLO, S_RDL, S_RDH} st_e;
  st_e st;
  logic [7:0] cnt;
  logic [2:0] ch;
  logic first;
  adc_t word [NREAD];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= S_RESET; cnt <= '0; ch <= '0; first <= 1'b1;
      adc_convst <= 1'b0; adc_reset <= 1'b1; adc_cs_n <= 1'b1; adc_rd_n <= 1'b1;
      valid <= 1'b0; frame <= '0;
      for (int i = 0; i < NREAD; i++) word[i] <= '0;
    end else begin
      valid <= 1'b0;
      unique case (st)
        S_RESET: begin
          cnt <= cnt + 1'b1;
          if (cnt == 8'(RST_TU - 1)) begin adc_reset <= 1'b0; cnt <= '0; st <= S_IDLE; end
        end
        S_IDLE: if (start) begin adc_convst <= 1'b1; cnt <= '0; st <= S_CONV; end
        S_CONV: begin
          cnt <= cnt + 1'b1;
          if (cnt == 8'(CONV_TU - 1)) begin adc_convst <= 1'b0; cnt <= '0; st <= S_WHI; end
        end
        S_WHI: begin
          cnt <= cnt + 1'b1;
          if (adc_busy || cnt == 8'(BUSY_TO - 1)) st <= S_WLO;
        end
        S_WLO: if (!adc_busy) begin
          adc_cs_n <= 1'b0; adc_rd_n <= 1'b0; cnt <= '0; ch <= '0; st <= S_RDL;
        end
        S_RDL: begin
          cnt <= cnt + 1'b1;
          if (cnt == 8'(RD_TU - 1)) begin
            word[ch] <= adc_t'(adc_db);
            adc_rd_n <= 1'b1; cnt <= '0; st <= S_RDH;
          end
        end
        S_RDH: begin
          cnt <= cnt + 1'b1;
          if (cnt == 8'(RD_TU - 1)) begin
            cnt <= '0;
            if (ch == 3'(NREAD - 1)) begin
              adc_cs_n <= 1'b1;
              st       <= S_IDLE;
              first    <= 1'b0;
              if (!first) begin
                frame <= '{v21: word[0], v32: word[1], v43: word[2], ia: word[3], ib: word[4]};
                valid <= 1'b1;
              end
            end else begin
              ch <= ch + 1'b1; adc_rd_n <= 1'b0; st <= S_RDL;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end

  assign busy = (st != S_IDLE);
endmodule
