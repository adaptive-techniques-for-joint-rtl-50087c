// dfe_adapt -- AGC and adaptive DFE loop of one lane (sign-sign LMS).
//
// The analog path scales the post-XTC signal by A (VGA) and subtracts
// sum_j cj * s(x[k-j]) before the slicers. This block closes the loop
// digitally: err_sign_logic derives s(e[k]) from the data slicer and the
// +-B reference slicers; sslms_updn forms one UP/DN pair per coefficient and
// keeps the decision history x[k-1..k-NTAPS] (also the DFE feedback bits);
// one updn_integrator per coefficient holds the control word.
//
//   agc_gain : unsigned, A = agc_gain / 2^(AGC_W-1)   (0 .. 2)
//   dfe_tap  : signed,  cj = dfe_tap * TAP_LSB        (TAP_LSB = 2 mV)
//
// At convergence A settles where the equalised cursor equals the target B
// and each cj equals the j-th post-cursor ISI after the VGA, the UP/DN
// pulses toggling evenly. Slicer bits of UI k must be presented together;
// every coefficient word changes at the next clock (one update per UI).
// AGC_STEP / TAP_STEP (LSBs per pulse) set the adaptation speed mu.
// agc_en / tap_en freeze A or the taps; load writes the *_load_val words.
// AGC_RESET = 51 starts A at about 0.1 (the value the convergence example
// starts from); taps reset to 0. Widths and reset values are this design's
// choice. agc_sat / tap_sat flag a word sitting at a rail.
module dfe_adapt #(
  parameter int unsigned         NTAPS     = xtc_dfe_pkg::NTAPS_DEF,
  parameter int unsigned         AGC_W     = xtc_dfe_pkg::AGC_W_DEF,
  parameter int unsigned         TAP_W     = xtc_dfe_pkg::TAP_W_DEF,
  parameter int unsigned         AGC_STEP  = 1,
  parameter int unsigned         TAP_STEP  = 1,
  parameter logic [AGC_W-1:0]    AGC_RESET = AGC_W'(51)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     data_i,
  input  logic                     errp_i,
  input  logic                     errn_i,
  input  logic                     agc_en,
  input  logic                     tap_en,
  input  logic                     load,
  input  logic [AGC_W-1:0]         agc_load_val,
  input  logic [TAP_W-1:0]         tap_load_val [NTAPS],
  output logic [AGC_W-1:0]         agc_gain,
  output logic signed [TAP_W-1:0]  dfe_tap [NTAPS],
  output logic [NTAPS:1]           x_hist,
  output logic                     e_sign,
  output xtc_dfe_pkg::updn_t       agc_pulse,
  output xtc_dfe_pkg::updn_t       tap_pulse [NTAPS],
  output logic                     agc_sat,
  output logic [NTAPS-1:0]         tap_sat
);

  logic e_sign_b;
  logic agc_max, agc_min;
  logic [NTAPS-1:0] tap_max, tap_min;

  err_sign_logic u_err (
    .p_i (errp_i),
    .n_i (errn_i),
    .x_i (data_i),
    .e_i (e_sign),
    .e_ib(e_sign_b)
  );

  sslms_updn #(.NTAPS(NTAPS)) u_lms (
    .clk   (clk),
    .rst_n (rst_n),
    .x_i   (data_i),
    .e_i   (e_sign),
    .agc   (agc_pulse),
    .tap   (tap_pulse),
    .x_hist(x_hist)
  );

  updn_integrator #(
    .W        (AGC_W),
    .SIGNED   (1'b0),
    .STEP     (AGC_STEP),
    .RESET_VAL(AGC_RESET)
  ) u_agc (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (agc_en),
    .load    (load),
    .load_val(agc_load_val),
    .up      (agc_pulse.up),
    .dn      (agc_pulse.dn),
    .word    (agc_gain),
    .at_max  (agc_max),
    .at_min  (agc_min)
  );

  for (genvar j = 0; j < NTAPS; j++) begin : g_tap
    logic [TAP_W-1:0] w;
    updn_integrator #(
      .W        (TAP_W),
      .SIGNED   (1'b1),
      .STEP     (TAP_STEP),
      .RESET_VAL('0)
    ) u_tap (
      .clk     (clk),
      .rst_n   (rst_n),
      .en      (tap_en),
      .load    (load),
      .load_val(tap_load_val[j]),
      .up      (tap_pulse[j].up),
      .dn      (tap_pulse[j].dn),
      .word    (w),
      .at_max  (tap_max[j]),
      .at_min  (tap_min[j])
    );
    assign dfe_tap[j] = signed'(w);
  end

  // The sign-sign loops never sit in a no-update state.
  a_agc_updn: assert property (@(posedge clk) disable iff (!rst_n)
    agc_pulse.up ^ agc_pulse.dn)
    else $error("AGC loop must be in exactly one of UP/DN");
  a_err_compl: assert property (@(posedge clk) disable iff (!rst_n)
    e_sign_b == ~e_sign)
    else $error("complementary error sign mismatch");

  assign agc_sat = agc_max | agc_min;
  assign tap_sat = tap_max | tap_min;

endmodule
