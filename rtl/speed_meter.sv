// speed_meter: rotor speed from the encoder edges.
//
// A signed counter accumulates the counted encoder edges (up +1, down -1)
// during a window of WIN_TU clock cycles (2.5 ms by default). At the end of
// each window the count is pushed into a 4-deep history and the output is
// the sum of the last 4 window counts, i.e. the average over 10 ms scaled by
// 4. One output LSB is 60 / (4 * 2.5 ms * 4096) = 1.465 rpm mechanical,
// the 1.5 rpm precision of the description. Window length, averaging depth
// and the resolution follow the description; keeping the sum instead of
// dividing by 4 (a free scale) is this design's choice.
//
// Timing: speed and speed_valid update one cycle after a window closes.
module speed_meter #(
  parameter int unsigned WIN_TU = mac_pkg::SPEED_TU,
  parameter int          DEPTH  = 4,
  parameter int          SPD_W  = mac_pkg::SPD_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    edge_up,
  input  logic                    edge_dn,
  output logic signed [SPD_W-1:0] speed,
  output logic                    speed_valid
);
  localparam int TW = $clog2(WIN_TU);

  logic [TW-1:0] timer;
  logic signed [SPD_W-1:0] win_cnt;
  logic signed [SPD_W-1:0] hist [DEPTH];
  logic signed [SPD_W-1:0] win_next, sum;
  logic win_end;

  assign win_end = (timer == TW'(WIN_TU - 1));

  always_comb begin
    win_next = win_cnt;
    if (edge_up & ~edge_dn) win_next = win_cnt + 1'b1;
    if (edge_dn & ~edge_up) win_next = win_cnt - 1'b1;
    sum = win_next;
    for (int i = 0; i < DEPTH - 1; i++) sum = sum + hist[i];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      timer <= '0; win_cnt <= '0; speed <= '0; speed_valid <= 1'b0;
      for (int i = 0; i < DEPTH; i++) hist[i] <= '0;
    end else begin
      speed_valid <= 1'b0;
      if (win_end) begin
        timer   <= '0;
        win_cnt <= '0;
        hist[0] <= win_next;
        for (int i = 1; i < DEPTH; i++) hist[i] <= hist[i-1];
        speed       <= sum;
        speed_valid <= 1'b1;
      end else begin
        timer   <= timer + 1'b1;
        win_cnt <= win_next;
      end
    end
endmodule
