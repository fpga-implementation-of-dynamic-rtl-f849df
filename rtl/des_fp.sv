// des_fp: DES final permutation (the inverse of the initial permutation).
//
// Applied to the swapped halves {R16, L16} after the last round to form the
// output block. Purely combinational; bit [63] is DES bit 1. The table is the
// FIPS 46 one (IP^-1).
module des_fp
  import des_pkg::*;
(
  input  logic [63:0] x,
  output logic [63:0] y
);
  always_comb y = perm_fp(x);
endmodule
