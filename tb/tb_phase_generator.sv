// tb_phase_generator: a leg driven through a full period of levels 1-2-3-4-3-2-1;
// checks the device map of the leg schematic for each level, the
// turn-off-then-blanking-then-turn-on sequence with its TD and TB timing,
// and the column enables.
module tb_phase_generator;
  localparam int TS = 400, TB = 10, TD = 2;
  logic clk = 0, rst_n = 0, tick = 0;
  logic [8:0] carrier, cnt;
  logic [8:0] thr [3];
  logic [2:0] col_en;
  logic [1:0] level;
  logic [11:0] gates;
  int checks = 0, failures = 0, transitions = 0, blank_seen = 0;
  always #10 clk = ~clk;

  phase_generator #(.TS(TS), .TB(TB), .TD(TD)) dut (.clk, .rst_n, .tick, .carrier, .thr, .col_en,
                                                    .level, .gates);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // device -> (j, complemented), in the mac_pkg bit order:
  // Sn11 Sp13 Sn22 Sp22 Sn33 Sp31 | Sn21 Sp12 Sn32 Sp21 | Sn31 Sp11
  int dev_j [12]   = '{1, 1, 2, 2, 3, 3, 2, 1, 3, 2, 3, 1};
  bit dev_inv [12] = '{0, 1, 0, 1, 0, 1, 0, 1, 0, 1, 0, 1};
  function automatic logic [11:0] expect_g(input int k);   // terminal k = 1..4
    logic [11:0] g;
    for (int b = 0; b < 12; b++) g[b] = (dev_j[b] >= k) ^ dev_inv[b];
    return g;
  endfunction

  // carrier as the switching_period block makes it
  always_ff @(posedge clk) if (!rst_n) cnt <= '0; else cnt <= (cnt == TS - 1) ? '0 : cnt + 1'b1;
  always_ff @(posedge clk) tick <= rst_n && (cnt == TS - 1);
  assign carrier = (cnt < TS / 2) ? cnt : 9'(TS) - cnt;

  initial begin
    #3_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [11:0] prev_g, old_g, new_g;
    int k_exp, k_prev, since;
    thr = '{9'd40, 9'd90, 9'd150};
    col_en = 3'b111;
    repeat (2) @(posedge clk); rst_n = 1;
    @(posedge clk iff tick);          // thresholds are taken at the period start
    @(posedge clk iff tick);
    k_prev = 1; since = 1000; old_g = expect_g(1); new_g = old_g;
    for (int t = 0; t < 2 * TS; t++) begin
      @(negedge clk);
      k_exp = 1 + (carrier >= thr[0]) + (carrier >= thr[1]) + (carrier >= thr[2]);
      check(level == 2'(k_exp - 1), "level");
      if (k_exp != k_prev) begin
        transitions++; since = 0; old_g = expect_g(k_prev); new_g = expect_g(k_exp);
      end else since++;
      k_prev = k_exp;
      // since = cycles since the carrier crossed; gate word changes at
      // TD+1 (turn-off) and TD+TB+1 (turn-on) after the crossing
      if (since <= TD)           check(gates == old_g, $sformatf("hold old t=%0d", t));
      else if (since <= TD + TB) begin
        check(gates == (old_g & new_g), $sformatf("blanking t=%0d", t));
        blank_seen++;
      end
      else                       check(gates == new_g, $sformatf("new level t=%0d g=%h exp=%h since=%0d k=%0d car=%0d", t, gates, new_g, since, k_exp, carrier));
      // complementary devices of column 1 never on together
      check(!(gates[0] && gates[1]) && !(gates[2] && gates[3]) && !(gates[4] && gates[5]), "no overlap");
    end
    check(transitions == 12, $sformatf("six level changes per period, got %0d", transitions));
    check(blank_seen > 0, "blanking seen");
    // column enables
    col_en = 3'b100; #1;
    check((gates & 12'hFC0) == 0, "only column 1");
    col_en = 3'b001; #1;
    check((gates & 12'h3FF) == 0, "only column 3");
    col_en = 3'b000; #1;
    check(gates == 0, "all off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
