// pla_output_drv: output drivers and output latch of the PLA.
//
// Each sum line of the OR plane is restored to a PLA output: an odd sum line
// (precharged high, pulled low when one of its product terms is true) goes
// through an inverter; with ALT_POL set (first configuration) an even sum
// line, which precharges low and is pulled high, goes through a
// non-inverting driver. Either way the driver output is the OR of the line's
// product terms. The inverting/non-inverting drivers follow the document; the
// output latch, open while latch_en (phi2, when the OR plane evaluates) is
// high so that y holds its value while the sum lines precharge in phi1, is
// this design's own addition.
//
// Timing: y is registered and follows the restored sum lines at each
// settle-clock edge while latch_en is high. Reset clears y.
module pla_output_drv
  import pla_pkg::*;
#(
  parameter int unsigned NO      = 3,
  parameter bit          ALT_POL = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NO-1:0] sline,
  input  logic          latch_en,
  output logic [NO-1:0] y
);
  logic [NO-1:0] restored;

  always_comb begin
    for (int k = 0; k < NO; k++)
      restored[k] = (ALT_POL && even_line(k)) ? sline[k] : ~sline[k];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)        y <= '0;
    else if (latch_en) y <= restored;
  end

endmodule
