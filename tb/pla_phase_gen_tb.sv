// pla_phase_gen_tb: checks the two-phase clock: the phases never overlap,
// each is high for PH_CYC settle cycles, separated by GAP_CYC cycles, the
// period is 2*(PH_CYC+GAP_CYC) and cyc_start marks the first cycle of phi1.
module pla_phase_gen_tb;
  localparam int unsigned PH = 2, GAP = 1, PERIOD = 2 * (PH + GAP);
  logic clk = 1'b0, rst_n, phi1, phi2, cyc_start;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pla_phase_gen #(.PH_CYC(PH), .GAP_CYC(GAP)) dut (.clk, .rst_n, .phi1, .phi2, .cyc_start);

  task automatic check(input string what, input logic [2:0] got, input logic [2:0] exp);
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
    int t;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // wait for the first phase
    t = 0;
    while (!cyc_start) begin
      @(posedge clk); #1;
      t++;
    end
    check("first phase within two cycles", 3'(t <= 2), 3'b1);
    for (int n = 0; n < 40 * PERIOD; n++) begin
      int k;
      logic [2:0] exp;
      k = n % PERIOD;
      exp[2] = (k < PH);                               // phi1
      exp[1] = (k >= PH + GAP) && (k < 2 * PH + GAP);  // phi2
      exp[0] = (k == 0);                               // cyc_start
      check($sformatf("phase pattern at %0d", k), {phi1, phi2, cyc_start}, exp);
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
