// sslms_updn -- sign-sign LMS pulse generator for the AGC gain and the DFE
// taps of one lane, with the flip-flops that hold past decisions.
//
// Update rules (per UI), with s(.) = +-1:
//   A [k+1] = A [k] - 2mu * s(x[k])   * s(e[k])
//   cj[k+1] = cj[k] + 2mu * s(x[k-j]) * s(e[k])      j = 1..NTAPS
// In bits (x_i, e_i = 1 for +1) the products become XOR/XNOR:
//   agc.up   = e_i ^ x_i          agc.dn   = ~agc.up
//   tap[j].up = ~(e_i ^ x[k-j])   tap[j].dn = ~tap[j].up
// so every loop is always in either UP or DN.
//
// A shift register of NTAPS flip-flops holds x[k-1] .. x[k-NTAPS]; its
// contents are also the DFE feedback bits that select +-cj in the analog
// summer. x_i and e_i must come from the same UI (the three slicers share
// one clock); the pulses are combinational from them and the history.
// The AGC row and the update equations come from the source scheme. Its
// minimised logic table also lists XOR for the tap rows; the tap polarity
// here follows the update equations instead (with XOR the taps diverge).
module sslms_updn #(
  parameter int unsigned NTAPS = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    x_i,
  input  logic                    e_i,
  output xtc_dfe_pkg::updn_t      agc,
  output xtc_dfe_pkg::updn_t      tap [NTAPS],
  output logic [NTAPS:1]          x_hist
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_hist <= '0;
    end else begin
      x_hist[1] <= x_i;
      for (int j = 2; j <= NTAPS; j++) x_hist[j] <= x_hist[j-1];
    end
  end

  always_comb begin
    agc.up = e_i ^ x_i;
    agc.dn = ~agc.up;
    for (int j = 1; j <= NTAPS; j++) begin
      tap[j-1].up = ~(e_i ^ x_hist[j]);
      tap[j-1].dn = e_i ^ x_hist[j];
    end
  end

endmodule
