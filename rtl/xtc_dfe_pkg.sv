// xtc_dfe_pkg -- shared constants and types of the joint XTC / AGC / DFE
// adaptation controller.
//
// The controller closes three kinds of background loops around a two-lane
// single-ended receiver: a crosstalk-cancellation (XTC) ratio alpha per lane,
// a VGA/AGC gain A per lane and NTAPS decision-feedback taps per lane. Each
// loop turns slicer decisions into UP/DN pulses and integrates them into a
// control word that sets an analog gain (the receiver's analog path is
// outside this RTL).
//
// Word widths are this design's choice. They are sized so that one UP pulse
// moves a control by about the step the analog loops use: the XTC word spans
// V_CONT = 0..1 V in 2^8 steps (close to the 4.2 mV charge-pump step
// I_s*T_b/C = 50 uA * 83.3 ps / 1 pF), the gain word spans A = 0..2 in 2^10
// steps and a tap word is signed with a 2 mV step (2*mu = 0.002 with
// mu = 0.001 as in the sign-sign LMS example).
package xtc_dfe_pkg;

  // Number of lanes handled by the controller (two coupled lanes).
  localparam int unsigned NLANES = 2;
  // DFE post-cursor taps (c1, c2, c3 in the integrated architecture).
  localparam int unsigned NTAPS_DEF = 3;
  // XTC control word (digital V_CONT) and its DAC slice width.
  localparam int unsigned ALPHA_W_DEF = 8;
  localparam int unsigned ALPHA_DAC_W_DEF = 3;
  // AGC gain word, unsigned, 0..2 full scale.
  localparam int unsigned AGC_W_DEF = 10;
  // DFE tap word, two's complement.
  localparam int unsigned TAP_W_DEF = 8;

  // Slicer decisions of one lane for one unit interval, after CML-to-CMOS
  // conversion. data: 0-degree data-centre slicer (threshold 0). edge:
  // 180-degree edge slicer (threshold 0). errp / errn: 0-degree error slicers
  // with thresholds +B/2 and -B/2 on the positive half of z[k].
  typedef struct packed {
    logic data;
    logic edge_s;
    logic errp;
    logic errn;
  } lane_slicers_t;

  // Pulse to an integrator: UP, DN or neither (hold).
  typedef struct packed {
    logic up;
    logic dn;
  } updn_t;

endpackage
