// des_key_schedule: iterative DES subkey generator.
//
// On `load` the 64-bit key loses its eight parity bits (bits 8, 16, ..., 64)
// through PC-1 and the remaining 56 bits are stored as two 28-bit halves C and
// D. Each round the halves are rotated and PC-2 picks the 48-bit subkey from
// them. For encryption the rotation is left by one place in rounds 1, 2, 9, 16
// and by two otherwise, as DES defines. For decryption the subkeys are needed
// in reverse order, which this design obtains by rotating right by
// 0,1,2,2,2,2,2,2,1,2,2,2,2,2,2,1 (a full turn of 28 places brings the halves
// back to their loaded value, so round 1 of decryption uses them unrotated).
// `subkey` is combinational from the stored halves, `round_idx` and `mode`;
// the rotated halves are written back when `round_en` is high.
module des_key_schedule
  import des_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [63:0] key,
  input  logic        mode,      // 0 encrypt, 1 decrypt
  input  logic        round_en,
  input  logic [3:0]  round_idx,
  output logic [47:0] subkey
);
  logic [27:0] c_q, d_q, c_n, d_n;
  logic        dec_q;

  always_comb begin
    if (dec_q) begin
      c_n = rotr28(c_q, DEC_SHIFT_T[round_idx]);
      d_n = rotr28(d_q, DEC_SHIFT_T[round_idx]);
    end else begin
      c_n = rotl28(c_q, ENC_SHIFT_T[round_idx]);
      d_n = rotl28(d_q, ENC_SHIFT_T[round_idx]);
    end
    subkey = perm_pc2({c_n, d_n});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q   <= '0;
      d_q   <= '0;
      dec_q <= 1'b0;
    end else if (load) begin
      {c_q, d_q} <= perm_pc1(key);
      dec_q      <= mode;
    end else if (round_en) begin
      c_q <= c_n;
      d_q <= d_n;
    end
  end
endmodule
