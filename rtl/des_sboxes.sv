// des_sboxes: the eight DES substitution boxes.
//
// The 48-bit input is cut into eight 6-bit groups, x[47:42] feeding S1 and
// x[5:0] feeding S8. In each group the outer two bits pick the row and the
// inner four the column of a 4x16 table of 4-bit values; the eight results are
// concatenated into the 32-bit output, S1 in y[31:28]. This is the only
// non-linear step of DES. Combinational; the tables are the FIPS 46 S-boxes.
module des_sboxes
  import des_pkg::*;
(
  input  logic [47:0] x,
  output logic [31:0] y
);
  always_comb begin
    for (int n = 0; n < 8; n++)
      y[31-4*n -: 4] = sbox(3'(n), x[47-6*n -: 6]);
  end
endmodule
