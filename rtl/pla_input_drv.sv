// pla_input_drv: input drivers of the AND plane with CP_test gating.
//
// Each primary input x[i] drives two input (bit) lines of the AND plane: a
// true line and a complement line. Each line is driven by a two-input NOR
// gate whose second input is CP_test, so the true line is NOR(~x, CP_test)
// and the complement line NOR(x, CP_test). In normal mode (CP_test low) the
// lines carry x and ~x; with CP_test high every input line is pulled low so
// that no AND-plane crosspoint transistor conducts during an IDDQ
// measurement. The NOR gating is the document's; the inverter in front of
// the true line's NOR and the layout order of the lines (true line of input
// 0, its complement, true line of input 1, ...) are this design's reading.
//
// Combinational; bl[2i] is the true line, bl[2i+1] the complement line.
module pla_input_drv #(
  parameter int unsigned NI = 3
) (
  input  logic [NI-1:0]   x,
  input  logic            cp_test,
  output logic [2*NI-1:0] bl
);
  always_comb begin
    for (int i = 0; i < NI; i++) begin
      bl[2*i]     = ~(~x[i] | cp_test);
      bl[2*i + 1] = ~( x[i] | cp_test);
    end
  end
endmodule
