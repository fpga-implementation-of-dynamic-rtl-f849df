// des_feistel: one DES round, the Feistel round function with its XOR.
//
// R(i-1) is expanded to 48 bits by the E table, XORed with the 48-bit round
// subkey K(i), passed through the eight S-boxes down to 32 bits, permuted by P
// and XORed with L(i-1) to give the new right half R(i); the old right half
// becomes the new left half L(i). Purely combinational: the core registers the
// halves and reuses this one round 16 times. E and P are the FIPS 46 tables.
module des_feistel
  import des_pkg::*;
(
  input  logic [31:0] l_in,
  input  logic [31:0] r_in,
  input  logic [47:0] subkey,
  output logic [31:0] l_out,
  output logic [31:0] r_out
);
  logic [47:0] mixed;
  logic [31:0] sub;

  always_comb mixed = perm_e(r_in) ^ subkey;

  des_sboxes u_sboxes (.x(mixed), .y(sub));

  always_comb begin
    l_out = r_in;
    r_out = l_in ^ perm_p(sub);
  end
endmodule
