// iddq_pla_tb: end-to-end test of the IDDQ-testable PLA in both
// configurations.
//
// dut1 is the PLA with every parameter at its default (first configuration,
// 3 inputs, 4 product terms, 3 outputs); dut2 is the same PLA in the second
// configuration. Both run side by side on the same inputs:
//   1. normal operation: a new input vector every PLA cycle; the outputs at
//      the start of the next cycle must equal the sum-of-products function,
//      computed here from its equations, and a PLA cycle must last
//      2*(PH_CYC+GAP_CYC) = 6 settle cycles;
//   2. IDDQ test 1: every crosspoint gate line low, no steady current path
//      in the fault-free PLA, and every pair of neighbouring lines in both
//      planes at complementary levels (so every bridge between neighbours
//      would raise the quiescent current); odd product lines high against
//      low input lines (bridges between input and product lines);
//   3. IDDQ test 2: with all inputs equal, neighbouring AND-plane input
//      lines complementary, no steady current;
//   4. IDDQ test 3: first configuration - the OR-plane gate lines carry the
//      product terms of the applied data (coverage depends on the data, the
//      best vector is searched); second configuration - the OR-plane gate
//      lines alternate whatever the function, with no steady current;
//   5. back to normal mode, outputs correct again.
// Each mechanism is counted and a mechanism that never occurred counts as a
// failure.
module iddq_pla_tb;
  import pla_pkg::*;
  localparam int unsigned NI = 3, NP = 4, NO = 3;

  logic clk = 1'b0, rst_n;
  logic [NI-1:0] x;
  logic tm_en, tm_step;

  logic [NO-1:0]   y1, y2;
  logic            cs1, cs2, sp1, sp2;
  test_mode_e      m1, m2;
  pla_ctrl_t       c1, c2;
  logic [2*NI-1:0] ag1, ag2;
  logic [2*NP-1:0] al1, al2;
  logic [NP-1:0]   og1, og2;
  logic [2*NO-1:0] ol1, ol2;

  int checks = 0, failures = 0;
  int n_normal = 0, n_test1 = 0, n_test2 = 0, n_test3_c1 = 0, n_test3_c2 = 0;
  int n_cp = 0, n_br = 0, n_or = 0, n_return = 0, n_bridges = 0, n_type5 = 0;

  always #5 clk = ~clk;

  iddq_pla dut1 (
    .clk, .rst_n, .x, .tm_en, .tm_step, .y(y1), .cyc_start(cs1), .mode(m1), .ctrl(c1),
    .obs_and_gate(ag1), .obs_and_layout(al1), .obs_or_gate(og1), .obs_or_layout(ol1),
    .static_path(sp1));

  iddq_pla #(.CONFIG(2)) dut2 (
    .clk, .rst_n, .x, .tm_en, .tm_step, .y(y2), .cyc_start(cs2), .mode(m2), .ctrl(c2),
    .obs_and_gate(ag2), .obs_and_layout(al2), .obs_or_gate(og2), .obs_or_layout(ol2),
    .static_path(sp2));

  // reference function, written from its equations
  function automatic logic [NP-1:0] terms(input logic [NI-1:0] v);
    return {~v[1] & ~v[2], v[1] & ~v[2], ~v[0] & v[2], v[0] & v[1]};
  endfunction
  function automatic logic [NO-1:0] func(input logic [NI-1:0] v);
    logic [NP-1:0] p;
    p = terms(v);
    return {p[0] | p[3], p[1] | p[2], p[0] | p[1]};
  endfunction

  // number of neighbouring pairs at different levels (bridges IDDQ detects)
  function automatic int unsigned diff_pairs(input logic [31:0] v, input int unsigned n);
    int unsigned c = 0;
    for (int i = 0; i + 1 < n; i++) if (v[i] != v[i+1]) c++;
    return c;
  endfunction

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic settle(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic next_cycle_start();
    do begin
      @(posedge clk); #1;
    end while (!cs1);
  endtask

  task automatic pulse_step();
    tm_step = 1; settle(1);
    tm_step = 0; settle(3);
  endtask

  task automatic run_normal(input int n);
    logic [NI-1:0] prev;
    int t0, len;
    next_cycle_start();
    x = NI'($urandom);
    for (int k = 0; k < n; k++) begin
      prev = x;
      t0 = int'($time);
      next_cycle_start();
      len = (int'($time) - t0) / 10;
      check("PLA cycle length in settle cycles", len, 6);
      check("cfg1 output", y1, func(prev));
      check("cfg2 output", y2, func(prev));
      check("no static current in normal mode", {sp1, sp2}, 2'b00);
      if (m1 == TM_NORMAL && y1 == func(prev)) n_normal++;
      x = NI'($urandom);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int best;
    logic [NI-1:0] best_x;
    rst_n = 0; x = '0; tm_en = 0; tm_step = 0;
    settle(2);
    rst_n = 1;

    // 1. normal operation, every input vector at least once
    run_normal(64);

    // 2. IDDQ test 1
    tm_en = 1;
    x = NI'($urandom);
    settle(6);
    check("mode test1", {m1, m2}, {TM_TEST1, TM_TEST1});
    check("cfg1 test1 controls", c1, 5'b11100);
    check("cfg2 test1 controls", c2, 5'b11110);
    if (c1.cp_test) n_cp++;
    if (c2.br_test) n_br++;
    check("test1 AND input lines low", {ag1, ag2}, '0);
    check("test1 OR gate lines low", {og1, og2}, '0);
    check("test1 no static current", {sp1, sp2}, 2'b00);
    check("cfg1 test1 AND plane neighbours", diff_pairs(32'(al1), 2*NP), 2*NP - 1);
    check("cfg1 test1 OR plane neighbours", diff_pairs(32'(ol1), 2*NO), 2*NO - 1);
    check("cfg2 test1 AND plane neighbours", diff_pairs(32'(al2), 2*NP), 2*NP - 1);
    check("cfg2 test1 OR plane neighbours", diff_pairs(32'(ol2), 2*NO), 2*NO - 1);
    n_bridges += diff_pairs(32'(al1), 2*NP) + diff_pairs(32'(ol1), 2*NO);
    if (!sp1 && !sp2 && diff_pairs(32'(al2), 2*NP) == 2*NP - 1) n_test1++;
    // bridges between an input line and an odd product line (types 5/6):
    // input lines are low, odd product lines high, in both configurations
    for (int j = 0; j < NP; j += 2) begin
      check("cfg1 test1 odd product line high", al1[2*j+1], 1'b1);
      check("cfg2 test1 odd product line high", al2[2*j+1], 1'b1);
      if (al1[2*j+1] != ag1[0] && al2[2*j+1] != ag2[0]) n_type5++;
    end

    // 3. IDDQ test 2, with all inputs equal
    pulse_step();
    for (int v = 0; v < 2; v++) begin
      x = v[0] ? '1 : '0;
      settle(4);
      check("mode test2", {m1, m2}, {TM_TEST2, TM_TEST2});
      check("cfg1 test2 controls", c1, 5'b10000);
      check("cfg2 test2 controls", c2, 5'b10000);
      check("test2 AND input lines alternate", diff_pairs(32'(ag1), 2*NI), 2*NI - 1);
      check("test2 no static current", {sp1, sp2}, 2'b00);
      if (diff_pairs(32'(ag1), 2*NI) == 2*NI - 1 && !sp1) n_test2++;
    end

    // 4. IDDQ test 3: each data vector is applied before stepping into test 3,
    //    whose entry precharges the AND plane; then back round to test 2
    best = -1; best_x = '0;
    for (int v = 0; v < (1 << NI); v++) begin
      x = NI'(v);
      pulse_step();
      settle(4);
      check("mode test3", {m1, m2}, {TM_TEST3, TM_TEST3});
      check("cfg1 test3 controls", c1, 5'b10000);
      check("cfg2 test3 controls", c2, 5'b11111);
      if (c2.or_test) n_or++;
      check("cfg1 test3 OR gate lines carry the product terms", og1, terms(x));
      check("cfg1 test3 no static current", sp1, 1'b0);
      check("cfg2 test3 OR gate lines alternate", og2, 4'b0101);
      for (int k = 0; k + 1 < NO; k += 2)
        check("cfg2 test3 neighbouring sum lines differ", ol2[2*k+1] ^ ol2[2*k+2], 1'b1);
      check("cfg2 test3 no static current", sp2, 1'b0);
      if (int'(diff_pairs(32'(og1), NP)) > best) begin
        best = diff_pairs(32'(og1), NP);
        best_x = x;
      end
      if (!sp2 && og2 == 4'b0101) n_test3_c2++;
      pulse_step();   // to test 1
      pulse_step();   // to test 2
    end
    // with this function one vector makes every neighbouring pair differ
    check("cfg1 test3 best vector covers all pairs", best, NP - 1);
    if (best == NP - 1) n_test3_c1++;
    $display("first configuration, test 3: best data vector x=%b", best_x);

    // 5. back to normal mode
    tm_en = 0;
    settle(2);
    check("mode normal", {m1, m2}, {TM_NORMAL, TM_NORMAL});
    if (m1 == TM_NORMAL) n_return++;
    run_normal(16);

    $display("mechanisms: normal=%0d test1=%0d test2=%0d test3(cfg1)=%0d test3(cfg2)=%0d cp_test=%0d br_test=%0d or_test=%0d return=%0d bridges_excited=%0d type5=%0d",
             n_normal, n_test1, n_test2, n_test3_c1, n_test3_c2, n_cp, n_br, n_or, n_return, n_bridges, n_type5);
    checks++; if (n_normal == 0)   begin failures++; $display("FAIL normal operation never seen"); end
    checks++; if (n_test1 == 0)    begin failures++; $display("FAIL test 1 never seen"); end
    checks++; if (n_test2 == 0)    begin failures++; $display("FAIL test 2 never seen"); end
    checks++; if (n_test3_c1 == 0) begin failures++; $display("FAIL test 3 (cfg1) never seen"); end
    checks++; if (n_test3_c2 == 0) begin failures++; $display("FAIL test 3 (cfg2) never seen"); end
    checks++; if (n_cp == 0)       begin failures++; $display("FAIL CP_test never applied"); end
    checks++; if (n_br == 0)       begin failures++; $display("FAIL Br_test never applied"); end
    checks++; if (n_or == 0)       begin failures++; $display("FAIL OR_test never applied"); end
    checks++; if (n_return == 0)   begin failures++; $display("FAIL return to normal never seen"); end
    checks++; if (n_bridges == 0)  begin failures++; $display("FAIL no bridge excited"); end
    checks++; if (n_type5 == 0)    begin failures++; $display("FAIL no input-to-product-line bridge excited"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
