// pla_input_drv_tb: exhaustive check of the NOR-gated AND-plane input lines.
// With CP_test low every input must appear as a true/complement pair; with
// CP_test high every input line must be low whatever the inputs.
module pla_input_drv_tb;
  localparam int unsigned NI = 3;
  logic [NI-1:0]   x;
  logic            cp_test;
  logic [2*NI-1:0] bl;
  int checks = 0, failures = 0;

  pla_input_drv #(.NI(NI)) dut (.x, .cp_test, .bl);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      for (int v = 0; v < (1 << NI); v++) begin
        logic [2*NI-1:0] exp;
        x = NI'(v); cp_test = c[0];
        #1;
        for (int i = 0; i < NI; i++) begin
          exp[2*i]     = c[0] ? 1'b0 : x[i];
          exp[2*i + 1] = c[0] ? 1'b0 : !x[i];
        end
        checks++;
        if (bl !== exp) begin
          failures++;
          $display("FAIL x=%b cp_test=%0d bl=%b expected %b", x, c, bl, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
