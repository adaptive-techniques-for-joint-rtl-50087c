// err_sign_logic -- sign of the LMS error e[k] = z[k] - B*x[k] from three
// slicer decisions (combinational).
//
// Instead of forming B*x[k] and subtracting at the symbol rate, z[k] is
// compared with fixed levels: p_i = (z > +B), n_i = (z > -B), x_i = (z > 0)
// (on the positive half of the differential signal the levels are +-B/2).
// When the data bit is 1 the error is positive only if z is above +B, which
// needs both p_i and n_i; when the data bit is 0 the error is positive if z
// is above -B, i.e. n_i alone:
//   e_i = (p_i & n_i) | (n_i & ~x_i),   e_ib = ~e_i
// e_i = 1 stands for sign(e[k]) = +1, e_i = 0 for sign(e[k]) = -1.
module err_sign_logic (
  input  logic p_i,
  input  logic n_i,
  input  logic x_i,
  output logic e_i,
  output logic e_ib
);

  always_comb begin
    e_i  = (p_i & n_i) | (n_i & ~x_i);
    e_ib = ~e_i;
  end

endmodule
