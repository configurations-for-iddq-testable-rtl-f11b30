// iddq_pla_bridge_tb: bridging-fault coverage of the three IDDQ tests on a
// larger PLA (4 inputs, 6 product terms, 5 outputs), in both configurations.
//
// A bridge between two neighbouring wires is excited by a measurement when
// the fault-free PLA holds the two wires at different levels without any
// steady current of its own. For every class of neighbouring pair this test
// counts the bridges excited over the measurements and compares with what the
// configurations promise:
//   test 1: every pair of neighbouring product/sum/evaluation lines in both
//           planes (bridge types 1, 3 and 4), in both configurations;
//   test 2: every pair of neighbouring AND-plane input lines (type 2);
//   test 3: second configuration - every pair of neighbouring OR-plane gate
//           lines (type 2) and of neighbouring sum lines (type 1) for any
//           function; first configuration - the pairs whose product terms
//           differ for some input vector, worked out here from the
//           crosspoint maps.
// Normal operation is checked against the function computed from the
// crosspoint maps for every input vector first.
module iddq_pla_bridge_tb;
  import pla_pkg::*;
  localparam int unsigned NI = 4, NP = 6, NO = 5;
  // P0 = x0&x1, P1 = ~x0&x2, P2 = x1&~x3, P3 = ~x2&x3, P4 = x0&~x1&x3, P5 = ~x3
  localparam logic [NP-1:0][2*NI-1:0] AND_XP =
      {8'b0100_0000, 8'b1000_0110, 8'b1001_0000, 8'b0100_1000, 8'b0010_0001, 8'b0000_1010};
  // y0 = P0|P1, y1 = P2|P3|P4, y2 = P5, y3 = P0|P3|P5, y4 = P1|P4
  localparam logic [NO-1:0][NP-1:0] OR_XP =
      {6'b010010, 6'b101001, 6'b100000, 6'b011100, 6'b000011};

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

  always #5 clk = ~clk;

  iddq_pla #(.CONFIG(1), .NI(NI), .NP(NP), .NO(NO), .AND_XP(AND_XP), .OR_XP(OR_XP)) dut1 (
    .clk, .rst_n, .x, .tm_en, .tm_step, .y(y1), .cyc_start(cs1), .mode(m1), .ctrl(c1),
    .obs_and_gate(ag1), .obs_and_layout(al1), .obs_or_gate(og1), .obs_or_layout(ol1),
    .static_path(sp1));

  iddq_pla #(.CONFIG(2), .NI(NI), .NP(NP), .NO(NO), .AND_XP(AND_XP), .OR_XP(OR_XP)) dut2 (
    .clk, .rst_n, .x, .tm_en, .tm_step, .y(y2), .cyc_start(cs2), .mode(m2), .ctrl(c2),
    .obs_and_gate(ag2), .obs_and_layout(al2), .obs_or_gate(og2), .obs_or_layout(ol2),
    .static_path(sp2));

  // reference: product term j holds when every literal it contains holds
  function automatic logic [NP-1:0] terms(input logic [NI-1:0] v);
    logic [NP-1:0] p;
    for (int j = 0; j < NP; j++) begin
      p[j] = 1'b1;
      for (int i = 0; i < NI; i++) begin
        if (AND_XP[j][2*i+1] && !v[i]) p[j] = 1'b0;
        if (AND_XP[j][2*i]   &&  v[i]) p[j] = 1'b0;
      end
    end
    return p;
  endfunction
  function automatic logic [NO-1:0] func(input logic [NI-1:0] v);
    logic [NO-1:0] f;
    for (int k = 0; k < NO; k++) f[k] = |(OR_XP[k] & terms(v));
    return f;
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

  // excited pairs accumulated per class: bit i = pair (i, i+1)
  logic [2*NP-2:0] and_lines_1, and_lines_2;
  logic [2*NO-2:0] or_lines_1, or_lines_2;
  logic [2*NI-2:0] in_lines_1, in_lines_2;
  logic [NP-2:0]   or_gates_1, or_gates_2, or_gates_ref;
  logic [NO-2:0]   sums_2;

  function automatic logic [31:0] pairs(input logic [31:0] v, input int unsigned n);
    logic [31:0] p = '0;
    for (int i = 0; i + 1 < n; i++) p[i] = v[i] ^ v[i+1];
    return p;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NI-1:0] prev;
    rst_n = 0; x = '0; tm_en = 0; tm_step = 0;
    and_lines_1 = '0; and_lines_2 = '0; or_lines_1 = '0; or_lines_2 = '0;
    in_lines_1 = '0; in_lines_2 = '0; or_gates_1 = '0; or_gates_2 = '0;
    or_gates_ref = '0; sums_2 = '0;
    settle(2);
    rst_n = 1;

    // normal operation over every input vector
    next_cycle_start();
    for (int v = 0; v <= (1 << NI); v++) begin
      prev = x;
      x = NI'(v);
      if (v > 0) begin
        check("cfg1 output", 32'(y1), 32'(func(prev)));
        check("cfg2 output", 32'(y2), 32'(func(prev)));
      end
      next_cycle_start();
    end

    // test 1
    tm_en = 1;
    settle(6);
    check("test 1 no static current", {sp1, sp2}, 0);
    if (!sp1) begin
      and_lines_1 |= (2*NP-1)'(pairs(32'(al1), 2*NP));
      or_lines_1  |= (2*NO-1)'(pairs(32'(ol1), 2*NO));
    end
    if (!sp2) begin
      and_lines_2 |= (2*NP-1)'(pairs(32'(al2), 2*NP));
      or_lines_2  |= (2*NO-1)'(pairs(32'(ol2), 2*NO));
    end

    // test 2, inputs all low then all high
    for (int v = 0; v < 2; v++) begin
      x = v[0] ? '1 : '0;
      if (v == 0) pulse_step();
      else settle(4);
      check("test 2 mode", 32'(m1), 32'(TM_TEST2));
      check("test 2 no static current", {sp1, sp2}, 0);
      if (!sp1) in_lines_1 |= (2*NI-1)'(pairs(32'(ag1), 2*NI));
      if (!sp2) in_lines_2 |= (2*NI-1)'(pairs(32'(ag2), 2*NI));
    end

    // test 3, entered afresh for every input vector
    for (int v = 0; v < (1 << NI); v++) begin
      x = NI'(v);
      pulse_step();
      settle(2);
      check("test 3 mode", 32'(m1), 32'(TM_TEST3));
      check("test 3 no static current", {sp1, sp2}, 0);
      check("cfg1 test 3 OR gate lines are the product terms", 32'(og1), 32'(terms(x)));
      if (!sp1) or_gates_1 |= (NP-1)'(pairs(32'(og1), NP));
      if (!sp2) begin
        or_gates_2 |= (NP-1)'(pairs(32'(og2), NP));
        // sum lines sit at layout positions 1, 2, 5, 6, ...
        for (int k = 0; k + 1 < NO; k += 2) sums_2[k] |= ol2[2*k+1] ^ ol2[2*k+2];
      end
      or_gates_ref |= (NP-1)'(pairs(32'(terms(x)), NP));
      pulse_step();  // test 1
      pulse_step();  // test 2
    end
    for (int k = 1; k + 1 < NO; k += 2) sums_2[k] = 1'b1;  // S2-R2-R3-S3: not sum-sum neighbours

    check("cfg1 test 1 AND-plane lines, all pairs", 32'(and_lines_1), 32'({(2*NP-1){1'b1}}));
    check("cfg1 test 1 OR-plane lines, all pairs",  32'(or_lines_1),  32'({(2*NO-1){1'b1}}));
    check("cfg2 test 1 AND-plane lines, all pairs", 32'(and_lines_2), 32'({(2*NP-1){1'b1}}));
    check("cfg2 test 1 OR-plane lines, all pairs",  32'(or_lines_2),  32'({(2*NO-1){1'b1}}));
    check("cfg1 test 2 input lines, all pairs", 32'(in_lines_1), 32'({(2*NI-1){1'b1}}));
    check("cfg2 test 2 input lines, all pairs", 32'(in_lines_2), 32'({(2*NI-1){1'b1}}));
    check("cfg2 test 3 OR gate lines, all pairs", 32'(or_gates_2), 32'({(NP-1){1'b1}}));
    check("cfg2 test 3 sum lines, all pairs", 32'(sums_2), 32'({(NO-1){1'b1}}));
    check("cfg1 test 3 OR gate lines, as the function allows", 32'(or_gates_1), 32'(or_gates_ref));
    $display("coverage: cfg1 test1 %0d/%0d + %0d/%0d, test2 %0d/%0d, test3 %0d/%0d (function-dependent); cfg2 test1 %0d/%0d + %0d/%0d, test2 %0d/%0d, test3 %0d/%0d",
             $countones(and_lines_1), 2*NP-1, $countones(or_lines_1), 2*NO-1,
             $countones(in_lines_1), 2*NI-1, $countones(or_gates_1), NP-1,
             $countones(and_lines_2), 2*NP-1, $countones(or_lines_2), 2*NO-1,
             $countones(in_lines_2), 2*NI-1, $countones(or_gates_2), NP-1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
