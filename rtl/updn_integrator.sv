// updn_integrator -- saturating up/down integrator, the digital stand-in for
// the charge pump (XTC loop) and RC integrators (AGC/DFE loops).
//
// Each clock (one unit interval) the word moves by STEP toward the rail named
// by the pulse: up -> +STEP, dn -> -STEP, neither (or both) -> hold. The
// "hold" case is the charge pump's no-update state that the XTC loop needs;
// the AGC/DFE loops always assert exactly one of up/dn. The word saturates at
// its rails instead of wrapping, like a control voltage that cannot leave
// its supply range. SIGNED selects a two's-complement range
// (-2^(W-1) .. 2^(W-1)-1) instead of 0 .. 2^W-1.
//
// load (synchronous, has priority over en) writes load_val: this is how the
// expected starting gain of a known channel product is preset. en = 0
// freezes the word (fixed coefficient). Reset loads RESET_VAL.
//
// Timing: the word registered at clock edge n reflects the pulse present
// just before edge n (one cycle latency, one update per unit interval).
// The saturating counter form is this design's choice; the source design
// integrates a current on a capacitor.
module updn_integrator #(
  parameter int unsigned    W         = 8,
  parameter bit             SIGNED    = 1'b0,
  parameter int unsigned    STEP      = 1,
  parameter logic [W-1:0]   RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         load,
  input  logic [W-1:0] load_val,
  input  logic         up,
  input  logic         dn,
  output logic [W-1:0] word,
  output logic         at_max,
  output logic         at_min
);

  // Rails expressed as W+2 bit signed numbers so that one compare serves both
  // the signed and the unsigned case.
  localparam int unsigned EW = W + 2;
  localparam logic signed [EW-1:0] MAXV = SIGNED ? EW'((1 << (W-1)) - 1) : EW'((1 << W) - 1);
  localparam logic signed [EW-1:0] MINV = SIGNED ? -EW'(1 << (W-1)) : '0;

  logic signed [EW-1:0] cur, nxt;

  always_comb begin
    cur = SIGNED ? EW'(signed'(word)) : EW'(word);
    nxt = cur;
    if (up && !dn)      nxt = cur + EW'(STEP);
    else if (dn && !up) nxt = cur - EW'(STEP);
    if (nxt > MAXV) nxt = MAXV;
    if (nxt < MINV) nxt = MINV;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    word <= RESET_VAL;
    else if (load) word <= load_val;
    else if (en)   word <= nxt[W-1:0];
  end

  assign at_max = (cur == MAXV);
  assign at_min = (cur == MINV);

endmodule
