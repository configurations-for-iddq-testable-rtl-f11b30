// pla_plane_link_tb: checks the latch, restoring drivers and NOR gating
// between the planes, for alternating (first configuration) and uniform
// (second configuration) line polarity. While the latch is open the OR-plane
// gate line must carry the product term (an even line of the alternating
// plane carries its complement); while it is closed it must hold; a high
// gate_off must force every gate line low.
module pla_plane_link_tb;
  localparam int unsigned NP = 4;
  logic clk = 1'b0, rst_n;
  logic [NP-1:0] pline, og_a, og_c;
  logic latch_en, gate_off;
  int checks = 0, failures = 0;
  localparam logic [NP-1:0] EVEN = 4'b1010;

  always #5 clk = ~clk;

  pla_plane_link #(.NP(NP), .ALT_POL(1'b1)) dut_a (.clk, .rst_n, .pline, .latch_en, .gate_off, .og(og_a));
  pla_plane_link #(.NP(NP), .ALT_POL(1'b0)) dut_c (.clk, .rst_n, .pline, .latch_en, .gate_off, .og(og_c));

  task automatic check(input string what, input logic [NP-1:0] got, input logic [NP-1:0] exp);
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
    logic [NP-1:0] term;
    rst_n = 0; latch_en = 0; gate_off = 0; pline = '0;
    @(posedge clk); #1;
    check("reset alt", og_a, '0);
    check("reset conv", og_c, '0);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      term = NP'($urandom);
      // physical line levels for these product-term values
      pline = term ^ EVEN;
      latch_en = 1; gate_off = 0;
      @(posedge clk); #1;
      check("alt passes term", og_a, term);
      check("conv passes line", og_c, pline);
      latch_en = 0;
      pline = NP'($urandom);
      @(posedge clk); #1;
      check("alt holds", og_a, term);
      gate_off = 1;
      #1;
      check("gate_off alt", og_a, '0);
      check("gate_off conv", og_c, '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
