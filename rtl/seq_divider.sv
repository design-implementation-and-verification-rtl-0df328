// seq_divider: unsigned restoring divider, one quotient bit per cycle.
//
// `start` loads numerator and denominator; NW+1 cycles later `done` pulses
// with quot = num / den (rounded down). A zero denominator gives an all-ones
// quotient. It serves the division by the dc-link voltage in the decoupling
// gain of the current loops, where one division per switching period
// leaves ample time for a bit-serial circuit (this design's choice).
module seq_divider #(
  parameter int NW = 38,
  parameter int DW = 14
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic [NW-1:0] quot,
  output logic          done,
  output logic          busy
);
  logic [NW-1:0] q;
  logic [DW-1:0] rem;
  logic [DW-1:0] d;
  logic [$clog2(NW+1)-1:0] n;
  logic [DW:0] trial;

  assign trial = {rem, q[NW-1]};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      q <= '0; rem <= '0; d <= '0; n <= '0; busy <= 1'b0; done <= 1'b0; quot <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        q <= num; rem <= '0; d <= den; n <= '0; busy <= 1'b1;
      end else if (busy) begin
        if (trial >= {1'b0, d}) begin
          rem <= DW'(trial - {1'b0, d});
          q   <= {q[NW-2:0], 1'b1};
        end else begin
          rem <= DW'(trial);
          q   <= {q[NW-2:0], 1'b0};
        end
        n <= n + 1'b1;
        if (n == $bits(n)'(NW - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          quot <= (trial >= {1'b0, d}) ? {q[NW-2:0], 1'b1} : {q[NW-2:0], 1'b0};
        end
      end
    end
endmodule
