// pla_dyn_plane_tb: self-checking test of the dynamic NOR plane.
//
// Two planes are tested side by side: one with alternating polarity (first
// configuration) and one conventional (second configuration). For random
// crosspoint maps and gate-line values the test steps through precharge,
// evaluation, hold, both-phases-high with and without gate lines, Br_test
// and the released evaluation lines, and compares every line level with the
// value expected for a NOR plane: a precharged line flips during evaluation
// exactly when one of its crosspoints has a high gate line.
module pla_dyn_plane_tb;
  import pla_pkg::*;
  localparam int unsigned NG = 6;
  localparam int unsigned NL = 4;

  logic clk = 1'b0;
  logic rst_n;
  logic [NG-1:0]         gate;
  logic [NL-1:0][NG-1:0] xp;
  logic pre_en, eval_en, br_test, eval_hiz;
  logic [NL-1:0]   line_a, evl_a, cont_a, line_c, evl_c, cont_c;
  logic [2*NL-1:0] lay_a, lay_c;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pla_dyn_plane #(.NG(NG), .NL(NL), .ALT_POL(1'b1)) dut_alt (
    .clk, .rst_n, .gate, .xp, .pre_en, .eval_en, .br_test(1'b0), .eval_hiz,
    .line(line_a), .evl(evl_a), .contention(cont_a), .layout(lay_a));

  pla_dyn_plane #(.NG(NG), .NL(NL), .ALT_POL(1'b0)) dut_conv (
    .clk, .rst_n, .gate, .xp, .pre_en, .eval_en, .br_test, .eval_hiz,
    .line(line_c), .evl(evl_c), .contention(cont_c), .layout(lay_c));

  // even-numbered lines (index 1, 3, ...) of the alternating plane precharge low
  localparam logic [NL-1:0] PRE_ALT = 4'b0101;
  localparam logic [NL-1:0] PRE_CONV = 4'b1111;
  localparam logic [2*NL-1:0] ALTERNATE = 8'b1010_1010;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic step(input logic pre, input logic ev, input logic br, input logic hiz);
    pre_en = pre; eval_en = ev; br_test = br; eval_hiz = hiz;
    @(posedge clk); #1;
  endtask

  function automatic logic [NL-1:0] conducting();
    logic [NL-1:0] c;
    for (int j = 0; j < NL; j++) c[j] = |(xp[j] & gate);
    return c;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NL-1:0] c, held_a;
    rst_n = 1'b0; gate = '0; xp = '0;
    pre_en = 0; eval_en = 0; br_test = 0; eval_hiz = 0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      for (int j = 0; j < NL; j++) xp[j] = NG'($urandom);
      // precharge with gate lines low
      gate = '0;
      step(1, 0, 0, 0);
      check("precharge alt", line_a, PRE_ALT);
      check("precharge conv", line_c, PRE_CONV);
      // evaluation with random gate lines
      gate = NG'($urandom);
      c = conducting();
      step(0, 1, 0, 0);
      check("evaluate alt", line_a, PRE_ALT ^ c);
      check("evaluate conv", line_c, PRE_CONV ^ c);
      check("eval lines alt", evl_a, NL'(~PRE_ALT));
      check("no contention in normal phases", {cont_a, cont_c}, '0);
      // hold: nothing drives, gate lines change, levels are kept
      held_a = line_a;
      gate = NG'($urandom);
      step(0, 0, 0, 0);
      check("hold alt", line_a, held_a);
      // test 1 conditions: both phases high, every crosspoint off
      gate = '0;
      step(1, 1, 0, 0);
      check("test1 alt layout alternates", lay_a, ALTERNATE);
      check("test1 alt no current", cont_a, '0);
      check("test1 conv without Br_test: neighbours equal", lay_c, {NL/2{4'b0110}});
      // second configuration: Br_test makes neighbours complementary
      step(1, 1, 1, 0);
      check("test1 conv with Br_test layout alternates", lay_c, ALTERNATE);
      check("test1 conv no current", cont_c, '0);
      // both phases high with conducting crosspoints: steady current
      gate = NG'($urandom);
      c = conducting();
      step(1, 1, 0, 0);
      check("contention alt", cont_a, c);
      check("contention conv", cont_c, c);
      // released evaluation lines: no current, they follow their line
      step(1, 0, 1, 1);
      check("hiz no current", cont_c, '0);
      for (int j = 0; j < NL; j++)
        if (c[j]) check("hiz eval line follows line", evl_c[j], line_c[j]);
      check("hiz Br_test even lines low", line_c & 4'b1010, '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
