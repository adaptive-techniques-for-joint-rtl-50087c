// xtc_dfe_top -- joint adaptive crosstalk cancellation (XTC) and AGC/DFE
// controller for two coupled single-ended lanes.
//
// Each lane's receiver adds a differentiated copy of the other lane to its
// own signal (ratio G(1-alpha) : G*alpha), then applies a VGA gain A and a
// 3-tap DFE. Four slicers per lane feed this block every unit interval (UI):
// a data slicer and two error slicers (+-B) on the 0-degree clock, and an
// edge slicer on the 180-degree clock. Two independent sets of loops run on
// these decisions:
//
//  * XTC loop (per lane): the edge sample half-way between data samples is
//    where crosstalk peaks and the forward signal crosses zero. The lane's
//    xtc_sample_align lines up x[t0], x[t0.5], x[t1]; xtc_adapt compares the
//    victim's edge bit with the polarity predicted from the other lane's
//    transition and integrates UP/DN into alpha (V_CONT word).
//  * AGC/DFE loop (per lane): at the data-centre instant the ISI dominates;
//    dfe_adapt runs sign-sign LMS on A and c1..c3 against target level B.
//
// Because the two loops sample at different instants they adapt
// independently and simultaneously.
//
// Ports are per-lane arrays; lane 0's aggressor is lane 1 and vice versa.
// Outputs are the control words for the analog blocks (adder ratio, VGA
// gain, tap weights) and the DFE feedback bits. Control words change one
// clock after the slicer bits that caused them for the DFE loops and three
// clocks after for the XTC loop (two alignment flip-flops plus the
// integrator). The UP/DN pulses, the error sign and the saturation flags are
// brought out for monitoring. load presets all words from the *_init inputs (expected
// settings of a known channel product); xtc_en / dfe_en freeze the loops.
// XTC_STEP, AGC_STEP and TAP_STEP set each loop's gain (step per pulse):
// larger steps converge faster at the cost of more steady-state ripple.
// Reset puts alpha at 0 (V_CONT = 0 V), the taps at 0 and A at unity gain,
// so the equalised cursor starts large enough for the decisions that the
// DFE loop relies on (with a very small start gain, tap adaptation can walk
// into a wrong equilibrium before the gain has grown).
// Two lanes, three taps and the slicer arrangement follow the source
// architecture; word widths, reset values and the enable/load controls are
// this design's choices.
module xtc_dfe_top #(
  parameter int unsigned NTAPS       = xtc_dfe_pkg::NTAPS_DEF,
  parameter int unsigned ALPHA_W     = xtc_dfe_pkg::ALPHA_W_DEF,
  parameter int unsigned ALPHA_DAC_W = xtc_dfe_pkg::ALPHA_DAC_W_DEF,
  parameter int unsigned AGC_W       = xtc_dfe_pkg::AGC_W_DEF,
  parameter int unsigned TAP_W       = xtc_dfe_pkg::TAP_W_DEF,
  // Loop gains, in LSBs per UP/DN pulse.
  parameter int unsigned XTC_STEP    = 1,
  parameter int unsigned AGC_STEP    = 1,
  parameter int unsigned TAP_STEP    = 1,
  // VGA gain after reset: mid-scale, A = 1 (unity).
  parameter logic [AGC_W-1:0] AGC_RESET = AGC_W'(1 << (AGC_W - 1))
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  xtc_dfe_pkg::lane_slicers_t    slicers     [xtc_dfe_pkg::NLANES],
  input  logic [xtc_dfe_pkg::NLANES-1:0] xtc_en,
  input  logic [xtc_dfe_pkg::NLANES-1:0] dfe_en,
  input  logic                          load,
  input  logic [ALPHA_W-1:0]            alpha_init  [xtc_dfe_pkg::NLANES],
  input  logic [AGC_W-1:0]              agc_init    [xtc_dfe_pkg::NLANES],
  input  logic [TAP_W-1:0]              tap_init    [xtc_dfe_pkg::NLANES][NTAPS],
  output logic [ALPHA_W-1:0]            alpha_vcont [xtc_dfe_pkg::NLANES],
  output logic [ALPHA_DAC_W-1:0]        alpha_dac   [xtc_dfe_pkg::NLANES],
  output logic [AGC_W-1:0]              agc_gain    [xtc_dfe_pkg::NLANES],
  output logic signed [TAP_W-1:0]       dfe_tap     [xtc_dfe_pkg::NLANES][NTAPS],
  output logic [NTAPS:1]                dfe_fb      [xtc_dfe_pkg::NLANES],
  output xtc_dfe_pkg::updn_t            xtc_pulse   [xtc_dfe_pkg::NLANES],
  output logic [xtc_dfe_pkg::NLANES-1:0] xtc_sat,
  output xtc_dfe_pkg::updn_t            agc_pulse   [xtc_dfe_pkg::NLANES],
  output xtc_dfe_pkg::updn_t            tap_pulse   [xtc_dfe_pkg::NLANES][NTAPS],
  output logic [xtc_dfe_pkg::NLANES-1:0] dfe_sat,
  output logic [xtc_dfe_pkg::NLANES-1:0] err_sign
);

  localparam int unsigned NL = xtc_dfe_pkg::NLANES;

  logic [NL-1:0] x_t0, x_t05, x_t1;

  for (genvar l = 0; l < NL; l++) begin : g_lane
    localparam int unsigned NBR = (l + 1) % NL;

    logic             a_max, a_min, agc_sat;
    logic [NTAPS-1:0] tap_sat;

    xtc_sample_align u_align (
      .clk     (clk),
      .rst_n   (rst_n),
      .data_smp(slicers[l].data),
      .edge_smp(slicers[l].edge_s),
      .x_t0    (x_t0[l]),
      .x_t05   (x_t05[l]),
      .x_t1    (x_t1[l])
    );

    xtc_adapt #(
      .ALPHA_W    (ALPHA_W),
      .ALPHA_DAC_W(ALPHA_DAC_W),
      .STEP       (XTC_STEP)
    ) u_xtc (
      .clk      (clk),
      .rst_n    (rst_n),
      .en       (xtc_en[l]),
      .load     (load),
      .load_val (alpha_init[l]),
      .own_t0   (x_t0[l]),
      .own_t05  (x_t05[l]),
      .own_t1   (x_t1[l]),
      .nbr_t0   (x_t0[NBR]),
      .nbr_t1   (x_t1[NBR]),
      .vcont    (alpha_vcont[l]),
      .alpha_dac(alpha_dac[l]),
      .pulse    (xtc_pulse[l]),
      .at_max   (a_max),
      .at_min   (a_min)
    );
    assign xtc_sat[l] = a_max | a_min;

    dfe_adapt #(
      .NTAPS(NTAPS),
      .AGC_W(AGC_W),
      .TAP_W(TAP_W),
      .AGC_STEP(AGC_STEP),
      .TAP_STEP(TAP_STEP),
      .AGC_RESET(AGC_RESET)
    ) u_dfe (
      .clk         (clk),
      .rst_n       (rst_n),
      .data_i      (slicers[l].data),
      .errp_i      (slicers[l].errp),
      .errn_i      (slicers[l].errn),
      .agc_en      (dfe_en[l]),
      .tap_en      (dfe_en[l]),
      .load        (load),
      .agc_load_val(agc_init[l]),
      .tap_load_val(tap_init[l]),
      .agc_gain    (agc_gain[l]),
      .dfe_tap     (dfe_tap[l]),
      .x_hist      (dfe_fb[l]),
      .e_sign      (err_sign[l]),
      .agc_pulse   (agc_pulse[l]),
      .tap_pulse   (tap_pulse[l]),
      .agc_sat     (agc_sat),
      .tap_sat     (tap_sat)
    );
    assign dfe_sat[l] = agc_sat | (|tap_sat);
  end

endmodule
