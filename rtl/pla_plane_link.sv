// pla_plane_link: dynamic latch, restoring driver and CP_test gate between
// the AND plane and the OR plane.
//
// Each product line passes through a full transmission gate (an n/p pass
// transistor pair, so a low level is passed at full swing) that is open while
// latch_en (phi1) is high and holds the product line's level on its output
// node while it is low. The held level is restored by an inverter on odd
// lines; with ALT_POL set (first configuration) even lines, which carry the
// complement of the product term, use a non-inverting driver instead. The
// result goes through a two-input NOR gate whose other input is gate_off, so
// the OR-plane gate line carries the product term in normal mode and is
// forced low (every OR-plane crosspoint off) while gate_off is high. In the
// first configuration gate_off is CP_test; in the second it is
// CP_test XOR (Br_test AND OR_test), so that test 3 can drive the product
// lines into the OR plane with CP_test high.
//
// The transmission gate, inverter/non-inverting driver and NOR gate are the
// document's; the order inverter-then-NOR is this design's reading of it.
// Timing: the held node is updated at each settle-clock edge while latch_en
// is high; og is combinational from the held node and gate_off. Reset puts
// every held node at the level that makes og low.
module pla_plane_link
  import pla_pkg::*;
#(
  parameter int unsigned NP      = 4,
  parameter bit          ALT_POL = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NP-1:0] pline,
  input  logic          latch_en,
  input  logic          gate_off,
  output logic [NP-1:0] og
);
  logic [NP-1:0] held, rst_lvl, restored;

  always_comb begin
    for (int j = 0; j < NP; j++) begin
      if (ALT_POL && even_line(j)) begin
        rst_lvl[j]  = 1'b1;
        restored[j] = held[j];    // non-inverting driver
      end else begin
        rst_lvl[j]  = 1'b0;
        restored[j] = ~held[j];   // inverter
      end
      og[j] = ~(restored[j] | gate_off);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)        held <= rst_lvl;
    else if (latch_en) held <= pline;
  end

endmodule
