// phase_generator: gate signals of one inverter leg (12 devices).
//
// The leg's output terminal k (1..4 on the dc link) is chosen by comparing
// the period's triangular carrier with three thresholds thr[0..2] latched at
// the start of each switching period: k-1 is the number of thresholds the
// carrier has reached, so over a period the leg climbs from terminal 1 to
// the highest terminal reached and back. Terminal k sets the control
// variables c_j = 0 for j < k and c_j = 1 for j >= k, and each device follows
// c_j or its complement as drawn in the leg schematic (see mac_pkg).
//
// Transitions are made safe in two steps: TD cycles after a new gate word is
// requested, the devices that must turn off are switched off; TB cycles
// later (the blanking time) the devices that must turn on are switched on.
// Finally each device is ANDed with the enable of its column (col_en[2] for
// the column next to the dc link, col_en[0] for the one next to the output),
// as the system state machine dictates.
// The c_j law, the device map, the 40 TU blanking time, the column AND and
// the 2 TU delay time follow the description; using the delay time before
// the turn-off, and the threshold/carrier form of the level command (the
// duty computation of the modulator is not described), are this design's.
//
// Timing: gate changes start TD+1 cycles after the carrier crosses a threshold.
module phase_generator
  import mac_pkg::*;
#(
  parameter int unsigned TS = TS_TU,
  parameter int unsigned TB = TB_TU,
  parameter int unsigned TD = TD_TU
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   tick,
  input  logic [$clog2(TS)-1:0]  carrier,
  input  logic [$clog2(TS)-1:0]  thr [3],
  input  logic [2:0]             col_en,   // {column 1, column 2, column 3}
  output logic [1:0]             level,    // k - 1
  output logic [11:0]            gates
);
  localparam int CW = $clog2(TS);
  localparam int TW = $clog2(TB + TD + 1);

  logic [CW-1:0] thr_l [3];
  logic [11:0] target, cur, want;
  logic [TW-1:0] t;
  typedef enum logic [1:0] {S_IDLE, S_DELAY, S_BLANK} st_e;
  st_e st;

  always_comb begin
    level  = 2'((carrier >= thr_l[0]) + 2'(carrier >= thr_l[1]) + 2'(carrier >= thr_l[2]));
    target = gates_from_c(c_from_level(level));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) thr_l[i] <= '1;
      st <= S_IDLE; t <= '0;
      cur  <= gates_from_c(3'b111);   // terminal 1
      want <= gates_from_c(3'b111);
    end else begin
      if (tick) for (int i = 0; i < 3; i++) thr_l[i] <= thr[i];
      unique case (st)
        S_IDLE: if (target != cur) begin
          want <= target; t <= '0;
          st   <= (TD == 0) ? S_BLANK : S_DELAY;
          if (TD == 0) cur <= cur & target;
        end
        S_DELAY: begin
          t <= t + 1'b1;
          if (t == TW'(TD - 1)) begin cur <= cur & want; t <= '0; st <= S_BLANK; end
        end
        S_BLANK: begin
          t <= t + 1'b1;
          if (t == TW'(TB - 1)) begin cur <= want; t <= '0; st <= S_IDLE; end
        end
        default: st <= S_IDLE;
      endcase
    end

  assign gates = cur & ({12{col_en[2]}} & COL1_MASK |
                        {12{col_en[1]}} & COL2_MASK |
                        {12{col_en[0]}} & COL3_MASK);

  // a device that is on never sees its complement on in the same column pair
  assert property (@(posedge clk) disable iff (!rst_n)
    !(cur[G_SN11] && cur[G_SP13]) && !(cur[G_SN22] && cur[G_SP22]) && !(cur[G_SN33] && cur[G_SP31]));
endmodule
