// iddq_pla: IDDQ-testable dynamic CMOS PLA (INV-NOR-NOR-INV).
//
// A dynamic PLA computes sums of products with two precharged NOR planes. Its
// closely spaced lines make bridging defects likely, but in a conventional
// dynamic PLA few of them can be found by measuring the quiescent supply
// current (IDDQ), because the lines are only ever precharged and evaluated
// and no steady conflict across a bridge can be set up. This PLA adds a test
// control CP_test that pulls every crosspoint gate line low (through NOR
// gates on the inputs and on the product lines entering the OR plane) and
// arranges the lines so that, with both clock phases held high, every pair
// of neighbouring lines sits at complementary levels. A bridge between any
// two neighbours then draws a steady current. Three IDDQ measurements
// (tests 1 to 3) cover the bridging-fault types of both planes.
//
// CONFIG = 1 (first configuration): odd product and sum lines precharge high
// and evaluate low, even ones precharge low and evaluate high; even lines use
// non-inverting drivers to keep the logic function. One test control,
// CP_test. CONFIG = 2 (second configuration): every line precharges high and
// evaluates low as in a conventional PLA, avoiding the threshold drop on
// even lines; Br_test forces even lines low and even evaluation lines high in
// test mode, OR_test releases the OR-plane evaluation lines, and the OR-plane
// gating signal is CP_test XOR (Br_test AND OR_test).
//
// Structure: pla_phase_gen makes the non-overlapping phases phi1/phi2;
// pla_test_ctrl overrides them and decodes the test controls in test mode;
// pla_input_drv drives the AND-plane input lines; pla_dyn_plane (AND plane:
// precharge in phi2, evaluate in phi1); pla_plane_link latches the product
// lines in phi1 and drives the OR plane; pla_dyn_plane (OR plane: precharge
// in phi1, evaluate in phi2); pla_output_drv latches the outputs in phi2.
//
// Personality: AND_XP[j][2i+1] set puts literal x_i into product term j
// (crosspoint on the complement line of input i), AND_XP[j][2i] set puts
// ~x_i into it; OR_XP[k][j] set puts product term j into output k. The
// default function is an example of this design's own (the document's
// example PLA has 3 inputs, 4 product terms and 3 outputs, which are the
// default sizes): P1 = x0&x1, P2 = ~x0&x2, P3 = x1&~x2, P4 = ~x1&~x2,
// y0 = P1|P2, y1 = P2|P3, y2 = P1|P4.
//
// Timing: one PLA cycle is 2*(PH_CYC+GAP_CYC) settle cycles, starting with
// phi1 (cyc_start marks its first settle cycle). x must be stable through
// phi1 of a cycle; y shows the result at the end of the phi2 of the same
// cycle and holds it until the next phi2. The obs_* outputs show the levels
// of the array lines for bridging-fault (IDDQ) analysis; static_path is high
// when a crosspoint connects two oppositely driven lines, i.e. when the
// fault-free PLA itself draws a steady current.
module iddq_pla
  import pla_pkg::*;
#(
  parameter int unsigned CONFIG         = 1,
  parameter int unsigned NI             = 3,
  parameter int unsigned NP             = 4,
  parameter int unsigned NO             = 3,
  parameter logic [NP-1:0][2*NI-1:0] AND_XP =
      {6'b010100, 6'b011000, 6'b100001, 6'b001010},
  parameter logic [NO-1:0][NP-1:0]   OR_XP  =
      {4'b1001, 4'b0110, 4'b0011},
  parameter bit          CP_FROM_PHASES = 1'b0,
  parameter int unsigned PH_CYC         = 2,
  parameter int unsigned GAP_CYC        = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NI-1:0]   x,
  input  logic            tm_en,
  input  logic            tm_step,
  output logic [NO-1:0]   y,
  output logic            cyc_start,
  output test_mode_e      mode,
  output pla_ctrl_t       ctrl,
  output logic [2*NI-1:0] obs_and_gate,
  output logic [2*NP-1:0] obs_and_layout,
  output logic [NP-1:0]   obs_or_gate,
  output logic [2*NO-1:0] obs_or_layout,
  output logic            static_path
);
  localparam bit ALT = (CONFIG == 1);

  logic          phi1_g, phi2_g;
  logic [NP-1:0] pline, pcont;
  logic [NO-1:0] sline, scont;
  logic          or_gate_off;

  pla_phase_gen #(.PH_CYC(PH_CYC), .GAP_CYC(GAP_CYC)) u_phase (
    .clk, .rst_n, .phi1(phi1_g), .phi2(phi2_g), .cyc_start
  );

  pla_test_ctrl #(.CONFIG(CONFIG), .CP_FROM_PHASES(CP_FROM_PHASES)) u_ctrl (
    .clk, .rst_n, .tm_en, .tm_step, .phi1_in(phi1_g), .phi2_in(phi2_g), .mode, .ctrl,
    .pre_active()
  );

  pla_input_drv #(.NI(NI)) u_in (
    .x, .cp_test(ctrl.cp_test), .bl(obs_and_gate)
  );

  pla_dyn_plane #(.NG(2*NI), .NL(NP), .ALT_POL(ALT)) u_and (
    .clk, .rst_n, .gate(obs_and_gate), .xp(AND_XP),
    .pre_en(ctrl.phi2), .eval_en(ctrl.phi1),
    .br_test(ctrl.br_test), .eval_hiz(1'b0),
    .line(pline), .evl(), .contention(pcont), .layout(obs_and_layout)
  );

  assign or_gate_off = (CONFIG == 1) ? ctrl.cp_test
                                     : ctrl.cp_test ^ (ctrl.br_test & ctrl.or_test);

  pla_plane_link #(.NP(NP), .ALT_POL(ALT)) u_link (
    .clk, .rst_n, .pline, .latch_en(ctrl.phi1), .gate_off(or_gate_off), .og(obs_or_gate)
  );

  pla_dyn_plane #(.NG(NP), .NL(NO), .ALT_POL(ALT)) u_or (
    .clk, .rst_n, .gate(obs_or_gate), .xp(OR_XP),
    .pre_en(ctrl.phi1), .eval_en(ctrl.phi2),
    .br_test(ctrl.br_test), .eval_hiz(ctrl.or_test),
    .line(sline), .evl(), .contention(scont), .layout(obs_or_layout)
  );

  pla_output_drv #(.NO(NO), .ALT_POL(ALT)) u_out (
    .clk, .rst_n, .sline, .latch_en(ctrl.phi2), .y
  );

  assign static_path = |{pcont, scont};

  initial begin
    assert (CONFIG == 1 || CONFIG == 2) else $error("CONFIG must be 1 or 2");
  end

endmodule
