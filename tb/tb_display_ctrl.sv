// tb_display_ctrl: the shown value changes only at the refresh instants
// (every REFRESH cycles) and the four digits decode it.
module tb_display_ctrl;
  localparam int REFRESH = 40;
  logic clk = 0, rst_n = 0;
  logic [15:0] vals [16];
  logic [3:0] sel;
  logic [15:0] shown;
  logic [6:0] hex_n [4];
  int checks = 0, failures = 0, changes = 0;
  always #10 clk = ~clk;

  display_ctrl #(.NVAL(16), .REFRESH_TU(REFRESH)) dut (.clk, .rst_n, .vals, .sel, .shown, .hex_n);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [6:0] pat [16] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19, 7'h12, 7'h02, 7'h78,
                           7'h00, 7'h10, 7'h08, 7'h03, 7'h46, 7'h21, 7'h06, 7'h0E};

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] prev;
    int t_last, t;
    for (int i = 0; i < 16; i++) vals[i] = 16'($urandom);
    sel = 4'd3;
    repeat (2) @(posedge clk); rst_n = 1;
    prev = shown; t_last = -1;
    for (t = 0; t < 20 * REFRESH; t++) begin
      @(negedge clk);
      vals[sel] = 16'($urandom);     // the source keeps moving
      if (t % 97 == 0) sel = 4'($urandom);
      if (shown != prev) begin
        if (t_last >= 0) check((t - t_last) % REFRESH == 0, $sformatf("refresh spacing %0d", t - t_last));
        t_last = t; changes++;
        for (int d = 0; d < 4; d++) check(hex_n[d] == pat[shown[4*d +: 4]], "digit pattern");
      end
      prev = shown;
    end
    check(changes >= 15, $sformatf("refreshes seen %0d", changes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
