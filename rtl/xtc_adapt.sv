// xtc_adapt -- adaptive XTC loop of one victim lane: detector plus
// integrator, producing the XTC control word (digital V_CONT) that sets the
// adder ratio alpha.
//
// xtc_detect turns the aligned victim/aggressor decisions into UP/DN/no-
// update; updn_integrator accumulates them with a step of one LSB per UI.
// The full word (ALPHA_W bits, 0..1 V of V_CONT, alpha = word / (2^W - 1))
// drives a fine analog control; its top ALPHA_DAC_W bits are the code for a
// binary-weighted current-switching adder (three bits switch I, 2I, 4I
// between the forward and the XTC pair, giving alpha = code/7).
//
// Because only UIs where both lanes switch produce a pulse (probability
// 1/4 for random data), the average slope is 0.25 LSB per UI; the word
// settles when the edge sample has zero mean. load presets the word to an
// expected starting value; en = 0 holds alpha fixed.
// STEP sets the loop gain (LSBs per pulse): a larger step settles faster
// but leaves more ripple on alpha, i.e. more residual crosstalk.
// Latency: one clock from aligned inputs to the updated word. Widths are
// this design's choice (see xtc_dfe_pkg).
module xtc_adapt #(
  parameter int unsigned          ALPHA_W     = xtc_dfe_pkg::ALPHA_W_DEF,
  parameter int unsigned          ALPHA_DAC_W = xtc_dfe_pkg::ALPHA_DAC_W_DEF,
  parameter int unsigned          STEP        = 1,
  parameter logic [ALPHA_W-1:0]   RESET_VAL   = '0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    load,
  input  logic [ALPHA_W-1:0]      load_val,
  input  logic                    own_t0,
  input  logic                    own_t05,
  input  logic                    own_t1,
  input  logic                    nbr_t0,
  input  logic                    nbr_t1,
  output logic [ALPHA_W-1:0]      vcont,
  output logic [ALPHA_DAC_W-1:0]  alpha_dac,
  output xtc_dfe_pkg::updn_t      pulse,
  output logic                    at_max,
  output logic                    at_min
);

  xtc_detect u_detect (
    .own_t0 (own_t0),
    .own_t05(own_t05),
    .own_t1 (own_t1),
    .nbr_t0 (nbr_t0),
    .nbr_t1 (nbr_t1),
    .up     (pulse.up),
    .dn     (pulse.dn)
  );

  updn_integrator #(
    .W        (ALPHA_W),
    .SIGNED   (1'b0),
    .STEP     (STEP),
    .RESET_VAL(RESET_VAL)
  ) u_int (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (en),
    .load    (load),
    .load_val(load_val),
    .up      (pulse.up),
    .dn      (pulse.dn),
    .word    (vcont),
    .at_max  (at_max),
    .at_min  (at_min)
  );

  assign alpha_dac = vcont[ALPHA_W-1 -: ALPHA_DAC_W];

endmodule
