// pla_dyn_plane: one dynamic NOR plane (AND plane or OR plane) of the PLA.
//
// NL output lines (product lines of the AND plane, sum lines of the OR plane)
// cross NG gate lines. Where xp[j][g] is set, a crosspoint transistor gated by
// gate line g connects output line j to its own evaluation line. A precharge
// device drives each output line to its precharge level while pre_en is high;
// an evaluation device drives each evaluation line to the opposite level
// while eval_en is high, so during evaluation an output line with a
// conducting crosspoint flips and the others keep their precharged charge.
//
// Polarity (ALT_POL): with ALT_POL = 0 every line precharges high and every
// evaluation line evaluates low (conventional plane, and the second
// configuration). With ALT_POL = 1 (first configuration) odd lines precharge
// high / evaluate low as before, but even lines precharge low and their
// evaluation lines evaluate high, so that neighbouring lines always sit at
// complementary levels. An even line therefore carries the complement of
// what an odd line with the same crosspoints would carry.
//
// Test controls: br_test (second configuration) turns off the precharge and
// evaluation devices of even lines and instead drives even output lines low
// and even evaluation lines high. eval_hiz (OR_test in the OR plane of the
// second configuration) turns off every driver of the evaluation lines.
//
// Node model: the level of every output and evaluation line is stored and
// re-resolved at each settle-clock edge. A line that nothing drives keeps its
// level (charge); a conducting crosspoint lets a driven node set the level of
// an undriven one; a conducting crosspoint between an output line and an
// evaluation line that are both driven to different levels is a steady
// supply-to-ground path, reported on contention[j] (the line keeps the
// precharge level in the model). This abstraction of the transistor circuit
// is this design's; the precharge/evaluation polarities and the effect of
// the test controls follow the document.
//
// layout gives the levels in the order the lines lie side by side: for odd
// line k, evaluation line then output line; for even line k, output line then
// evaluation line (E1 P1 P2 E2 E3 P3 P4 E4 ...), so that output lines face
// output lines and evaluation lines face evaluation lines.
module pla_dyn_plane
  import pla_pkg::*;
#(
  parameter int unsigned NG      = 6,
  parameter int unsigned NL      = 4,
  parameter bit          ALT_POL = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NG-1:0]          gate,
  input  logic [NL-1:0][NG-1:0]  xp,
  input  logic                   pre_en,
  input  logic                   eval_en,
  input  logic                   br_test,
  input  logic                   eval_hiz,
  output logic [NL-1:0]          line,
  output logic [NL-1:0]          evl,
  output logic [NL-1:0]          contention,
  output logic [2*NL-1:0]        layout
);
  logic [NL-1:0] line_d, evl_d, cont_d;
  logic [NL-1:0] pre_lvl;

  always_comb begin
    for (int j = 0; j < NL; j++) begin
      logic ev, cond, ld_on, ld_v, ed_on, ed_v;
      ev         = even_line(j);
      pre_lvl[j] = !(ALT_POL && ev);
      cond       = |(xp[j] & gate);
      // drivers on the output line
      ld_on = (pre_en && !(br_test && ev)) || (br_test && ev);
      ld_v  = (br_test && ev) ? 1'b0 : pre_lvl[j];
      // drivers on the evaluation line
      ed_on = !eval_hiz && ((eval_en && !(br_test && ev)) || (br_test && ev));
      ed_v  = (br_test && ev) ? 1'b1 : !pre_lvl[j];
      // resolve
      line_d[j] = line[j];
      evl_d[j]  = evl[j];
      cont_d[j] = 1'b0;
      if (ld_on && ed_on) begin
        line_d[j] = ld_v;
        evl_d[j]  = ed_v;
        cont_d[j] = cond && (ld_v != ed_v);
      end else if (ld_on) begin
        line_d[j] = ld_v;
        if (cond) evl_d[j] = ld_v;
      end else if (ed_on) begin
        evl_d[j] = ed_v;
        if (cond) line_d[j] = ed_v;
      end else if (cond) begin
        // charge sharing: the long output line dominates
        evl_d[j] = line[j];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      line       <= pre_lvl;
      evl        <= ~pre_lvl;
      contention <= '0;
    end else begin
      line       <= line_d;
      evl        <= evl_d;
      contention <= cont_d;
    end
  end

  always_comb begin
    for (int j = 0; j < NL; j++) begin
      if (even_line(j)) begin
        layout[2*j]     = line[j];
        layout[2*j + 1] = evl[j];
      end else begin
        layout[2*j]     = evl[j];
        layout[2*j + 1] = line[j];
      end
    end
  end

endmodule
