// des_ip: DES initial permutation.
//
// Rearranges the 64 bits of the incoming block by the standard IP table before
// the 16 Feistel rounds. Purely combinational; bit [63] of x and y is DES bit 1.
// The permutation block is the one drawn at the input of the DES block diagram;
// its table is the FIPS 46 one, since the block is described only as permuting
// the bits in a predefined way.
module des_ip
  import des_pkg::*;
(
  input  logic [63:0] x,
  output logic [63:0] y
);
  always_comb y = perm_ip(x);
endmodule
