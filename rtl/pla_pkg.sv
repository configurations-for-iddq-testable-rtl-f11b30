// pla_pkg: types and helpers shared by the IDDQ-testable dynamic PLA.
//
// The PLA is modelled at the level of its wires: every product, sum and
// evaluation line of the two dynamic planes is a stored logic level that is
// updated once per cycle of a fast "settle" clock, so that precharge,
// evaluation, charge retention and driver contention can all be observed.
// Lines are numbered from 1 in the descriptions (odd/even refers to that
// numbering); in the code, index j holds line j+1, so an even-numbered line
// has an odd index.
package pla_pkg;

  // Operating modes: normal operation and the three IDDQ measurements.
  typedef enum logic [1:0] {
    TM_NORMAL = 2'd0,
    TM_TEST1  = 2'd1,  // both phases high, crosspoints off: lines vs. evaluation lines
    TM_TEST2  = 2'd2,  // phi1 high, phi2 low, normal gating: AND-plane input lines
    TM_TEST3  = 2'd3   // OR-plane input lines (data-dependent in the first configuration)
  } test_mode_e;

  // Clock phases and test controls as applied to the arrays.
  typedef struct packed {
    logic phi1;     // evaluates the AND plane, precharges the OR plane, opens the plane latch
    logic phi2;     // evaluates the OR plane, precharges the AND plane, opens the output latch
    logic cp_test;  // forces every crosspoint gate line low
    logic br_test;  // second configuration: even lines low, even evaluation lines high
    logic or_test;  // second configuration: OR-plane evaluation lines released (high impedance)
  } pla_ctrl_t;

  // True for index j that holds an even-numbered line (line j+1).
  function automatic logic even_line(input int unsigned j);
    return (j % 2) == 1;
  endfunction

endpackage
