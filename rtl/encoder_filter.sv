// encoder_filter: digital noise filter for the encoder lines A, B and INDEX0.
//
// The three lines are first synchronised to the 50 MHz clock, then sampled
// once every SMP_DIV clock cycles (6.25 MHz by default). A line's filtered
// value changes only after STABLE consecutive samples (8 by default) have
// shown the new level, so glitches and bounces shorter than that are
// rejected. Sampling rate and the 8-sample rule follow the design
// description; the two-flop synchroniser and the per-line counters are this
// design's choices.
//
// Interface: raw {INDEX0, B, A} in, filtered {INDEX0, B, A} out.
// Timing: a clean level change appears at the output between
// (STABLE-1)*SMP_DIV+2 and STABLE*SMP_DIV+3 cycles after it reaches the pins.
module encoder_filter #(
  parameter int unsigned SMP_DIV = mac_pkg::ENC_SMP_DIV,
  parameter int unsigned STABLE  = mac_pkg::ENC_STABLE
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] enc_raw,   // {index0, b, a}
  output logic [2:0] enc_filt
);
  localparam int DW = $clog2(SMP_DIV);
  localparam int SW = $clog2(STABLE + 1);

  logic [2:0] sync1, sync2;
  logic [DW-1:0] div;
  logic smp_en;
  logic [SW-1:0] run [3];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sync1 <= '0; sync2 <= '0;
    end else begin
      sync1 <= enc_raw; sync2 <= sync1;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) div <= '0;
    else        div <= (div == DW'(SMP_DIV - 1)) ? '0 : div + 1'b1;

  assign smp_en = (div == '0);

  for (genvar i = 0; i < 3; i++) begin : g_line
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        run[i]      <= '0;
        enc_filt[i] <= 1'b0;
      end else if (smp_en) begin
        if (sync2[i] == enc_filt[i]) run[i] <= '0;
        else if (run[i] == SW'(STABLE - 1)) begin
          enc_filt[i] <= sync2[i];
          run[i]      <= '0;
        end else run[i] <= run[i] + 1'b1;
      end
  end
endmodule
