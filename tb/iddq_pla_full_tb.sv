// iddq_pla_full_tb: one complete operation of the PLA with every parameter
// at its default (first configuration, 3 inputs, 4 product terms, 3
// outputs): every input vector evaluated in normal mode and checked against
// the sum-of-products equations, then the three IDDQ measurements - test 1
// with all neighbouring array lines complementary and no steady current,
// test 2 with complementary neighbouring input lines, test 3 with the
// product terms on the OR-plane gate lines - and the return to normal mode.
module iddq_pla_full_tb;
  import pla_pkg::*;
  localparam int unsigned NI = 3, NP = 4, NO = 3;

  logic clk = 1'b0, rst_n;
  logic [NI-1:0] x;
  logic tm_en, tm_step;
  logic [NO-1:0]   y;
  logic            cs, sp;
  test_mode_e      m;
  pla_ctrl_t       c;
  logic [2*NI-1:0] ag;
  logic [2*NP-1:0] al;
  logic [NP-1:0]   og;
  logic [2*NO-1:0] ol;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  iddq_pla dut (
    .clk, .rst_n, .x, .tm_en, .tm_step, .y, .cyc_start(cs), .mode(m), .ctrl(c),
    .obs_and_gate(ag), .obs_and_layout(al), .obs_or_gate(og), .obs_or_layout(ol),
    .static_path(sp));

  function automatic logic [NP-1:0] terms(input logic [NI-1:0] v);
    return {~v[1] & ~v[2], v[1] & ~v[2], ~v[0] & v[2], v[0] & v[1]};
  endfunction
  function automatic logic [NO-1:0] func(input logic [NI-1:0] v);
    logic [NP-1:0] p;
    p = terms(v);
    return {p[0] | p[3], p[1] | p[2], p[0] | p[1]};
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
    end while (!cs);
  endtask

  task automatic pulse_step();
    tm_step = 1; settle(1);
    tm_step = 0; settle(3);
  endtask

  task automatic run_all_vectors();
    logic [NI-1:0] prev;
    next_cycle_start();
    for (int v = 0; v <= (1 << NI); v++) begin
      prev = x;
      x = NI'(v);
      if (v > 0) begin
        check("output one PLA cycle later", 32'(y), 32'(func(prev)));
        check("no static current", 32'(sp), 0);
      end
      next_cycle_start();
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; x = '0; tm_en = 0; tm_step = 0;
    settle(2);
    rst_n = 1;
    run_all_vectors();

    tm_en = 1;
    settle(6);
    check("test 1 controls", 32'(c), 32'(5'b11100));
    check("test 1 input lines low", 32'(ag), 0);
    check("test 1 AND plane lines alternate", 32'(al), 32'(8'b1010_1010));
    check("test 1 OR plane lines alternate", 32'(ol), 32'(6'b10_1010));
    check("test 1 no static current", 32'(sp), 0);

    x = '0;
    pulse_step();
    check("test 2 input lines alternate", 32'(ag), 32'(6'b10_1010));
    check("test 2 no static current", 32'(sp), 0);

    x = 3'b011;
    pulse_step();
    settle(2);
    check("test 3 mode", 32'(m), 32'(TM_TEST3));
    check("test 3 OR gate lines carry the product terms", 32'(og), 32'(terms(x)));
    check("test 3 OR gate lines alternate for this vector", 32'(og), 32'(4'b0101));
    check("test 3 no static current", 32'(sp), 0);

    tm_en = 0;
    settle(2);
    run_all_vectors();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
