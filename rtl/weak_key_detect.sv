// weak_key_detect: flags DES is_weak and semi-weak keys.
//
// DES has 4 is_weak keys (encrypting twice with one of them gives the plaintext
// back) and 12 semi-weak keys forming 6 pairs (one key of a pair decrypts what
// the other encrypts). The comparison ignores the eight parity bits (the least
// significant bit of every byte), which the key schedule drops anyway, so
// every parity variant of those 16 keys is caught. The 48 "possibly is_weak" keys
// are not checked. Combinational.
module weak_key_detect (
  input  logic [63:0] key,
  output logic        is_weak
);
  localparam logic [63:0] PARITY_MASK = 64'hFEFE_FEFE_FEFE_FEFE;
  localparam logic [63:0] WEAK_KEYS [16] = '{
    64'h0101010101010101, 64'hFEFEFEFEFEFEFEFE, 64'hE0E0E0E0F1F1F1F1, 64'h1F1F1F1F0E0E0E0E,
    64'h01FE01FE01FE01FE, 64'hFE01FE01FE01FE01, 64'h1FE01FE00EF10EF1, 64'hE01FE01FF10EF10E,
    64'h01E001E001F101F1, 64'hE001E001F101F101, 64'h1FFE1FFE0EFE0EFE, 64'hFE1FFE1FFE0EFE0E,
    64'h011F011F010E010E, 64'h1F011F010E010E01, 64'hE0FEE0FEF1FEF1FE, 64'hFEE0FEE0FEF1FEF1};

  always_comb begin
    is_weak = 1'b0;
    for (int i = 0; i < 16; i++)
      if ((key & PARITY_MASK) == (WEAK_KEYS[i] & PARITY_MASK)) is_weak = 1'b1;
  end
endmodule
