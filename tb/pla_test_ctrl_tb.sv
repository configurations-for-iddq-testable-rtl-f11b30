// pla_test_ctrl_tb: checks the test-control state machine for both
// configurations and for CP_test decoded from the phases. In normal mode the
// incoming phases pass and every test control is low; raising tm_en enters
// test 1 and each tm_step edge steps through tests 2 and 3 and back to 1; in
// each test the controls must match the IDDQ test conditions. Entering tests
// 2 and 3 must first give PRE_CYC = 2 settle cycles of phi2 alone.
module pla_test_ctrl_tb;
  import pla_pkg::*;
  logic clk = 1'b0, rst_n, tm_en, tm_step, phi1_in, phi2_in;
  test_mode_e m1, m2, m3;
  pla_ctrl_t  c1, c2, c3;
  logic       pa1, pa2, pa3;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pla_test_ctrl #(.CONFIG(1)) dut1 (.clk, .rst_n, .tm_en, .tm_step, .phi1_in, .phi2_in, .mode(m1), .ctrl(c1), .pre_active(pa1));
  pla_test_ctrl #(.CONFIG(2)) dut2 (.clk, .rst_n, .tm_en, .tm_step, .phi1_in, .phi2_in, .mode(m2), .ctrl(c2), .pre_active(pa2));
  pla_test_ctrl #(.CONFIG(2), .CP_FROM_PHASES(1'b1)) dut3 (.clk, .rst_n, .tm_en, .tm_step, .phi1_in, .phi2_in, .mode(m3), .ctrl(c3), .pre_active(pa3));

  task automatic check(input string what, input logic [4:0] got, input logic [4:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  // expected {phi1, phi2, cp, br, or} per configuration and test number
  function automatic logic [4:0] expected(input int cfg, input int test, input logic p1, input logic p2);
    case (test)
      1: return (cfg == 1) ? 5'b11100 : 5'b11110;
      2: return 5'b10000;
      3: return (cfg == 1) ? 5'b10000 : 5'b11111;
      default: return {p1, p2, 3'b000};
    endcase
  endfunction

  task automatic check_all(input int test);
    check($sformatf("cfg1 test %0d", test), c1, expected(1, test, phi1_in, phi2_in));
    check($sformatf("cfg2 test %0d", test), c2, expected(2, test, phi1_in, phi2_in));
    check($sformatf("cfg2 cp-from-phases test %0d", test), c3, expected(2, test, phi1_in, phi2_in));
    checks++;
    if (m1 != test_mode_e'(test) || m2 != test_mode_e'(test)) begin
      failures++;
      $display("FAIL mode %0d / %0d expected %0d", m1, m2, test);
    end
  endtask

  // step into a test preceded by the AND-plane precharge of 2 settle cycles
  task automatic pulse_step(input bit pre = 1'b1);
    tm_step = 1; @(posedge clk); #1;
    tm_step = 0;
    if (!pre) return;
    for (int k = 0; k < 2; k++) begin
      check("precharge before test", {c1[4:0] ^ 5'b01000, c2[4:0] ^ 5'b01000, c3[4:0] ^ 5'b01000}, '0);
      check("pre_active", {pa1, pa2, pa3, 2'b00}, 5'b11100);
      @(posedge clk); #1;
    end
    check("pre_active ends", {pa1, pa2, pa3, 2'b00}, 5'b00000);
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; tm_en = 0; tm_step = 0; phi1_in = 0; phi2_in = 0;
    @(posedge clk); #1;
    rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      // normal mode: phases pass through (non-overlapping)
      for (int p = 0; p < 3; p++) begin
        phi1_in = (p == 1); phi2_in = (p == 2);
        #1 check_all(0);
        @(posedge clk); #1;
      end
      tm_en = 1;
      @(posedge clk); #1;
      check_all(1);
      // a held tm_step advances only once
      tm_step = 1; repeat (4) @(posedge clk); #1;
      tm_step = 0; @(posedge clk); #1;
      check_all(2);
      tm_step = 1; @(posedge clk); #1;
      tm_step = 0; repeat (2) @(posedge clk); #1;
      check_all(3);
      tm_step = 1; @(posedge clk); #1;
      tm_step = 0; @(posedge clk); #1;
      check_all(1);
      pulse_step();
      check_all(2);
      pulse_step();
      check_all(3);
      pulse_step(1'b0);
      check_all(1);
      tm_en = 0;
      @(posedge clk); #1;
      check_all(0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
