// tb_param_regs: reset values, up/down steps of 1 and 16, mode limited to 0..2.
module tb_param_regs;
  localparam int NPAR = 10;
  localparam logic [15:0] RV [NPAR] = '{16'd0, 16'd0, 16'd41, 16'd0, 16'd0, 16'd16, 16'd4, 16'd8, 16'd2, 16'd16};
  logic clk = 0, rst_n = 0, up = 0, down = 0, coarse = 0;
  logic [3:0] sel = '0;
  logic [15:0] par [NPAR];
  int checks = 0, failures = 0;
  int model [NPAR];
  always #10 clk = ~clk;

  param_regs #(.NPAR(NPAR), .RESET_VALS(RV)) dut (.clk, .rst_n, .sel, .up, .down, .coarse, .par);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < NPAR; i++) begin model[i] = RV[i]; check(par[i] == RV[i], "reset value"); end
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      sel = 4'($urandom_range(0, NPAR - 1)); coarse = $urandom; up = $urandom; down = !up && $urandom;
      if (sel == 0) begin
        if (up && model[0] < 2) model[0]++;
        if (down && model[0] > 0) model[0]--;
      end else begin
        if (up) model[sel] = (model[sel] + (coarse ? 16 : 1)) & 16'hFFFF;
        if (down) model[sel] = (model[sel] - (coarse ? 16 : 1)) & 16'hFFFF;
      end
      @(negedge clk) up = 0; down = 0;
      for (int i = 0; i < NPAR; i++) check(par[i] == 16'(model[i]), $sformatf("par %0d", i));
    end
    check(par[0] <= 2, "mode in range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
