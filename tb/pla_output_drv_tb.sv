// pla_output_drv_tb: checks the output drivers and the phi2 output latch.
// An odd sum line is inverted, an even sum line of the alternating-polarity
// plane passes unchanged; the outputs follow while latch_en is high and hold
// while it is low.
module pla_output_drv_tb;
  localparam int unsigned NO = 3;
  logic clk = 1'b0, rst_n;
  logic [NO-1:0] sline, y_a, y_c;
  logic latch_en;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pla_output_drv #(.NO(NO), .ALT_POL(1'b1)) dut_a (.clk, .rst_n, .sline, .latch_en, .y(y_a));
  pla_output_drv #(.NO(NO), .ALT_POL(1'b0)) dut_c (.clk, .rst_n, .sline, .latch_en, .y(y_c));

  task automatic check(input string what, input logic [NO-1:0] got, input logic [NO-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NO-1:0] f, ya;
    rst_n = 0; latch_en = 0; sline = '0;
    @(posedge clk); #1;
    check("reset", y_a, '0);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      f = NO'($urandom);
      // sum line 2 (index 1) of the alternating plane carries the function itself
      sline = {~f[2], f[1], ~f[0]};
      latch_en = 1;
      @(posedge clk); #1;
      check("alt output", y_a, f);
      check("conv output", y_c, ~sline);
      ya = y_a;
      latch_en = 0;
      sline = NO'($urandom);
      @(posedge clk); #1;
      check("hold", y_a, ya);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
