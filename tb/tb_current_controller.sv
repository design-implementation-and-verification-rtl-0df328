// tb_current_controller: the two current loops with decoupling against a
// reference model: dd = PI_d(0 - id) - 12337*w*iq/Vdc >> 16,
// dq = PI_q(iq* - iq) + 12337*w*id/Vdc >> 16 (truncated toward zero), both
// saturated; also the decoupling switched off below the minimum Vdc.
module tb_current_controller;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, clear = 0, valid;
  logic signed [13:0] id, iq, iq_ref;
  logic signed [15:0] speed;
  logic [13:0] vdc;
  logic [7:0] kp, ki;
  logic signed [9:0] dd, dq;
  int checks = 0, failures = 0, dec_nonzero = 0;
  always #10 clk = ~clk;

  current_controller dut (.clk, .rst_n, .start, .clear, .id, .iq, .iq_ref, .speed, .vdc, .kp, .ki,
                          .dd, .dq, .valid);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic longint clampv(input longint v, input longint mx);
    return v > mx ? mx : (v < -mx ? -mx : v);
  endfunction

  function automatic longint dec(input longint i, input longint w, input longint v);
    longint m;
    if (v < 16) return 0;
    m = ((i < 0 ? -i : i) * (w < 0 ? -w : w) * 12337 / v) >> 16;
    if (m > 1023) m = 1023;
    return ((i < 0) != (w < 0)) ? -m : m;
  endfunction

  initial begin
    #4_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint ig_d, ig_q, e_d, e_q, yd, yq, td, tq;
    int cyc;
    id = '0; iq = '0; iq_ref = '0; speed = '0; vdc = '0; kp = 8'd16; ki = 8'd4;
    repeat (2) @(posedge clk); rst_n = 1;
    ig_d = 0; ig_q = 0;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      id = 14'($urandom_range(0, 2000) - 1000);
      iq = 14'($urandom_range(0, 2000) - 1000);
      iq_ref = 14'($urandom_range(0, 2000) - 1000);
      speed = 16'($urandom_range(0, 4000) - 2000);
      vdc = (k % 20 == 5) ? 14'd10 : 14'($urandom_range(800, 2400));
      kp = 8'($urandom_range(0, 40)); ki = 8'($urandom_range(0, 20));
      start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!valid && cyc < 100) begin @(negedge clk); cyc++; end
      check(cyc == 47, $sformatf("latency %0d", cyc));
      e_d = -longint'(id);
      e_q = longint'(iq_ref) - longint'(iq);
      ig_d = clampv(ig_d + ((e_d * longint'(ki)) >>> 7), 511);
      ig_q = clampv(ig_q + ((e_q * longint'(ki)) >>> 7), 511);
      yd = clampv(((e_d * longint'(kp)) >>> 4) + ig_d, 511);
      yq = clampv(((e_q * longint'(kp)) >>> 4) + ig_q, 511);
      td = dec(iq, speed, vdc);
      tq = dec(id, speed, vdc);
      if (td != 0) dec_nonzero++;
      check(dd == 10'(clampv(yd - td, 511)), $sformatf("dd %0d exp %0d", dd, clampv(yd - td, 511)));
      check(dq == 10'(clampv(yq + tq, 511)), $sformatf("dq %0d exp %0d", dq, clampv(yq + tq, 511)));
    end
    check(dec_nonzero > 50, "decoupling exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
