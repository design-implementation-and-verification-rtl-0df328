// param_regs: bank of user-modifiable parameters.
//
// The slider switches select a parameter (`sel`); the "up" and "down"
// button pulses add or subtract `step` (1, or 16 with the coarse switch).
// Index 0 is the operation mode and stays within 0..2; the other entries
// wrap as 16-bit numbers. Reset loads RESET_VALS. The existence of
// user-modifiable parameters shown on the display and entered with switches
// and buttons follows the description; the editing scheme, the list and the
// reset values are this design's choices (see the top level for the list).
module param_regs #(
  parameter int NPAR = 10,
  parameter logic [15:0] RESET_VALS [NPAR] = '{default: 16'd0}
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [$clog2(NPAR)-1:0] sel,
  input  logic                    up,
  input  logic                    down,
  input  logic                    coarse,
  output logic [15:0]             par [NPAR]
);
  logic [15:0] step;
  assign step = coarse ? 16'd16 : 16'd1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < NPAR; i++) par[i] <= RESET_VALS[i];
    end else if (int'(sel) < NPAR) begin
      if (sel == '0) begin
        if (up && par[0] < 16'd2)   par[0] <= par[0] + 1'b1;
        if (down && par[0] > 16'd0) par[0] <= par[0] - 1'b1;
      end else begin
        if (up)   par[sel] <= par[sel] + step;
        if (down) par[sel] <= par[sel] - step;
      end
    end
endmodule
