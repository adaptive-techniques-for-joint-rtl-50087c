// xtc_detect -- over/under-compensation detector of the adaptive XTC loop
// for one victim lane (combinational).
//
// Crosstalk from the neighbouring (aggressor) lane peaks at the aggressor's
// data transitions, i.e. half a UI away from the data-centre sampling
// instant. When both lanes switch in the same UI, the victim's own
// transition crosses zero in the middle of the UI, so the sign of the edge
// sample there is set by the residual crosstalk. A rising aggressor couples
// a negative bump and a falling aggressor a positive one, whatever the
// victim's own transition direction; the predicted edge bit is therefore
// the aggressor's bit before its transition, nbr_t0.
//
//   edge bit == prediction  -> crosstalk still visible -> UP (more XTC)
//   edge bit != prediction  -> crosstalk overcancelled  -> DN (less XTC)
//   no transition on either lane -> neither (integrator holds)
//
// This is exactly the four-row truth table of the detector; all other input
// combinations give no update. Inputs must be time-aligned (see
// xtc_sample_align); the outputs are valid in the same cycle.
module xtc_detect (
  input  logic own_t0,
  input  logic own_t05,
  input  logic own_t1,
  input  logic nbr_t0,
  input  logic nbr_t1,
  output logic up,
  output logic dn
);

  logic both_switch;

  always_comb begin
    both_switch = (own_t0 ^ own_t1) && (nbr_t0 ^ nbr_t1);
    up = both_switch && (own_t05 == nbr_t0);
    dn = both_switch && (own_t05 != nbr_t0);
  end

endmodule
