// pla_test_ctrl: on-board test-control state machine for the IDDQ test modes.
//
// The PLA needs, besides its two clock phases, one test control (CP_test) in
// the first configuration and three (CP_test, Br_test, OR_test) in the
// second. Where so many test pins are not available, a small state machine
// with one or two inputs can step through the IDDQ measurements and decode
// the controls. Here the two inputs are tm_en and tm_step: with tm_en low the
// PLA is in normal mode and the phases from the clock generator pass through
// unchanged with every test control low; raising tm_en enters test 1, and
// each rising edge of tm_step moves on, test 1 -> test 2 -> test 3 -> test 1.
//
// The applied controls per mode (phi1, phi2, CP_test, Br_test, OR_test):
//   CONFIG 1:  test 1 = 1,1,1,0,0   test 2 = 1,0,0,0,0   test 3 = 1,0,0,0,0
//   CONFIG 2:  test 1 = 1,1,1,1,0   test 2 = 1,0,0,0,0   test 3 = 1,1,1,1,1
// These values are the document's test conditions; tests 2 and 3 of the
// first configuration differ only in the data applied to the inputs. With
// CP_FROM_PHASES set, CP_test is instead decoded as phi1 AND phi2, the
// alternative the document names (CP_test is only needed high when both
// phases are high). The choice of inputs and the step order are this
// design's own.
//
// Tests 2 and 3 hold phi2 low, so the AND plane would keep whatever an
// earlier evaluation left on it. On every entry into test 2 or test 3 the
// controller therefore first applies PRE_CYC settle cycles of phi2 alone
// (AND plane precharge, every test control low) before the test conditions;
// pre_active is high during that precharge. This precharge step is this
// design's own.
//
// Timing: the mode register changes one settle cycle after tm_en / the
// tm_step edge is seen; the controls are a combinational decode of the mode
// register, the precharge counter and the incoming phases. Reset is
// synchronous, active low.
module pla_test_ctrl
  import pla_pkg::*;
#(
  parameter int unsigned CONFIG         = 1,
  parameter bit          CP_FROM_PHASES = 1'b0,
  parameter int unsigned PRE_CYC        = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tm_en,
  input  logic       tm_step,
  input  logic       phi1_in,
  input  logic       phi2_in,
  output test_mode_e mode,
  output pla_ctrl_t  ctrl,
  output logic       pre_active
);
  localparam int unsigned PW = $clog2(PRE_CYC + 1);

  logic          step_q, adv;
  logic [PW-1:0] pre_cnt;

  assign adv        = tm_step && !step_q;
  assign pre_active = (pre_cnt != '0);

  // precharge before tests 2 and 3: loaded when the mode steps into them
  always_ff @(posedge clk) begin
    if (!rst_n || !tm_en)                          pre_cnt <= '0;
    else if (adv && (mode == TM_TEST1 || mode == TM_TEST2)) pre_cnt <= PW'(PRE_CYC);
    else if (pre_cnt != '0)                        pre_cnt <= pre_cnt - 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode   <= TM_NORMAL;
      step_q <= 1'b0;
    end else begin
      step_q <= tm_step;
      if (!tm_en) mode <= TM_NORMAL;
      else begin
        unique case (mode)
          TM_NORMAL: mode <= TM_TEST1;
          TM_TEST1:  if (adv) mode <= TM_TEST2;
          TM_TEST2:  if (adv) mode <= TM_TEST3;
          TM_TEST3:  if (adv) mode <= TM_TEST1;
          default:   mode <= TM_NORMAL;
        endcase
      end
    end
  end

  pla_ctrl_t dec;

  always_comb begin
    dec = '0;
    unique case (mode)
      TM_NORMAL: begin
        dec.phi1 = phi1_in;
        dec.phi2 = phi2_in;
      end
      TM_TEST1: begin
        dec.phi1    = 1'b1;
        dec.phi2    = 1'b1;
        dec.cp_test = 1'b1;
        dec.br_test = (CONFIG == 2);
      end
      TM_TEST2: begin
        dec.phi1 = 1'b1;
      end
      TM_TEST3: begin
        dec.phi1 = 1'b1;
        if (CONFIG == 2) begin
          dec.phi2    = 1'b1;
          dec.cp_test = 1'b1;
          dec.br_test = 1'b1;
          dec.or_test = 1'b1;
        end
      end
      default: dec = '0;
    endcase
    if (pre_active) dec = '{phi1: 1'b0, phi2: 1'b1, cp_test: 1'b0, br_test: 1'b0, or_test: 1'b0};
    if (CP_FROM_PHASES) dec.cp_test = dec.phi1 & dec.phi2;
    ctrl = dec;
  end

  initial begin
    assert (CONFIG == 1 || CONFIG == 2) else $error("CONFIG must be 1 or 2");
  end

endmodule
