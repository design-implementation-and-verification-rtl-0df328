// switching_period: switching-period timer (10000 TU = 200 us by default).
//
// A free-running counter counts 0..TS-1. `tick` pulses for one cycle when it
// wraps, marking the start of a switching period: the ADCs are started there
// and all per-period values are updated from it. `carrier` is a triangle
// 0..TS/2..0 over the period, used by the phase generators so that a leg
// climbs the dc-link levels in the first half of the period and comes back
// down in the second. The period is the description's; the triangular
// carrier is this design's choice, since the modulator internals are not
// described.
module switching_period #(
  parameter int unsigned TS = mac_pkg::TS_TU
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output logic                     tick,
  output logic [$clog2(TS)-1:0]    count,
  output logic [$clog2(TS)-1:0]    carrier
);
  localparam int W = $clog2(TS);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      count <= '0;
      tick  <= 1'b0;
    end else begin
      tick  <= (count == W'(TS - 1));
      count <= (count == W'(TS - 1)) ? '0 : count + 1'b1;
    end

  always_comb
    carrier = (count < W'(TS / 2)) ? count : W'(TS) - count;
endmodule
