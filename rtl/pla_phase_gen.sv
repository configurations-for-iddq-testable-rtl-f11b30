// pla_phase_gen: two-phase non-overlapping clock for the dynamic PLA.
//
// A dynamic PLA runs on two non-overlapping phases: phi1 evaluates the AND
// plane and precharges the OR plane, phi2 evaluates the OR plane and
// precharges the AND plane. This generator derives both from a faster settle
// clock with a cycle counter: phi1 is high for PH_CYC settle cycles, then both
// phases are low for GAP_CYC cycles, then phi2 is high for PH_CYC cycles,
// then another gap. One PLA cycle is therefore 2*(PH_CYC+GAP_CYC) settle
// cycles. The two-phase, non-overlapping scheme follows the document; the way
// it is generated and the phase lengths are this design's choice.
//
// Interface: clk, rst_n (synchronous, active low) in; phi1, phi2 registered
// out; cyc_start pulses for one settle cycle in the first cycle of phi1.
// After reset the first phase is phi1, one settle cycle after rst_n rises.
module pla_phase_gen #(
  parameter int unsigned PH_CYC  = 2,
  parameter int unsigned GAP_CYC = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic phi1,
  output logic phi2,
  output logic cyc_start
);
  localparam int unsigned PERIOD = 2 * (PH_CYC + GAP_CYC);
  localparam int unsigned CW     = $clog2(PERIOD + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) cnt <= '0;
    else if (cnt == CW'(PERIOD - 1)) cnt <= '0;
    else cnt <= cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phi1      <= 1'b0;
      phi2      <= 1'b0;
      cyc_start <= 1'b0;
    end else begin
      // registered decode of the counter: phases never overlap
      phi1      <= (cnt < CW'(PH_CYC));
      phi2      <= (cnt >= CW'(PH_CYC + GAP_CYC)) && (cnt < CW'(2 * PH_CYC + GAP_CYC));
      cyc_start <= (cnt == '0);
    end
  end

  initial begin
    assert (PH_CYC >= 2) else $error("PH_CYC must be at least 2 so that each plane settles");
  end

  // the phases must never overlap
  always_ff @(posedge clk) if (rst_n) assert (!(phi1 && phi2)) else $error("phase overlap");

endmodule
