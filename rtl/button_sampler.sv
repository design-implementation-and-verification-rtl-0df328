// button_sampler: low-rate sampling of the push buttons.
//
// The (active-low) buttons are sampled once every SMP_TU cycles (25 Hz by
// default). Sampling that slowly hides contact bounce; a button sampled as
// pressed after being sampled as released gives exactly one pulse of one
// clock cycle on `press`. The 25 Hz rate and the one-TU pulse follow the
// description; active-low inputs and the two-flop synchroniser are this
// design's choices. The reset button is not handled here.
module button_sampler #(
  parameter int          N      = 3,
  parameter int unsigned SMP_TU = mac_pkg::BTN_TU
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] btn_n,
  output logic [N-1:0] press
);
  logic [$clog2(SMP_TU)-1:0] div;
  logic [N-1:0] s1, s2, smp;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      div <= '0; s1 <= '0; s2 <= '0; smp <= '0; press <= '0;
    end else begin
      s1 <= ~btn_n;
      s2 <= s1;
      press <= '0;
      if (div == $bits(div)'(SMP_TU - 1)) begin
        div   <= '0;
        smp   <= s2;
        press <= s2 & ~smp;
      end else div <= div + 1'b1;
    end
endmodule
