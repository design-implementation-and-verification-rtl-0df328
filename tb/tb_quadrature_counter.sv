// tb_quadrature_counter: forward and backward quadrature sequences, index
// alignment to -385 edges, electrical angle = position mod 1024, and the
// illegal double change flagged as an encoder error.
module tb_quadrature_counter;
  logic clk = 0, rst_n = 0;
  logic [2:0] enc = '0;
  logic [11:0] position;
  logic [9:0] phi;
  logic up, dn, err, idx;
  int checks = 0, failures = 0, n_up = 0, n_dn = 0, n_err = 0;
  int model;
  always #10 clk = ~clk;

  quadrature_counter dut (.clk, .rst_n, .enc, .position, .phi, .edge_up(up), .edge_dn(dn),
                          .enc_err(err), .index_seen(idx));

  always @(posedge clk) begin
    if (up) n_up++;
    if (dn) n_dn++;
    if (err) n_err++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // gray sequence A,B: 00 -> 01(A) -> 11 -> 10 forward (A leads)
  logic [1:0] seq [4] = '{2'b00, 2'b01, 2'b11, 2'b10};
  int ph = 0;
  task automatic step(input int dir);
    ph = (ph + dir + 4) % 4;
    enc[1:0] = seq[ph];
    repeat (3) @(posedge clk);
  endtask

  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1; repeat (2) @(posedge clk);
    model = 0;
    for (int i = 0; i < 1500; i++) begin step(1); model++; end
    check(position == 12'(model), $sformatf("forward position %0d vs %0d", position, model));
    check(n_up == 1500 && n_dn == 0, "edge pulses forward");
    check(phi == 10'(model), "phi = position mod 1024");
    check(!idx, "no index yet");
    // index pulse
    enc[2] = 1; repeat (3) @(posedge clk); enc[2] = 0; repeat (3) @(posedge clk);
    model = 4096 - 385;
    check(position == 12'(model), $sformatf("index load %0d", position));
    check(idx, "index seen");
    for (int i = 0; i < 700; i++) begin step(-1); model--; end
    check(position == 12'(model), $sformatf("backward position %0d vs %0d", position, model & 4095));
    check(n_dn == 700, "edge pulses backward");
    check(phi == 10'(model), "phi after backward");
    check(n_err == 0, "no error on legal moves");
    // illegal: both lines change
    enc[1:0] = ~enc[1:0]; repeat (3) @(posedge clk);
    check(n_err == 1, "double change flagged");
    check(position == 12'(model), "position held on illegal change");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
