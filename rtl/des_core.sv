// des_core: iterative DES encryption/decryption core.
//
// One copy of the Feistel round is reused for all 16 rounds, one round per
// clock, which trades speed for area as the DES hardware here is meant to.
// On `start` (while idle) the block goes through the initial permutation into
// the L/R registers and the key is loaded into the key schedule; `mode` picks
// encryption (0) or decryption (1), which only changes the subkey order. After
// ROUNDS round cycles the swapped halves {R16, L16} pass the final permutation
// into `dout`, and `done` pulses for one cycle.
//
// Timing: start in cycle 0, round i (1..16) in cycle i, done high in cycle 17
// with dout valid from then until the next operation finishes. din, key and
// mode are read only in the start cycle. busy is high from the cycle after
// start up to and including the last round.
module des_core
  import des_pkg::*;
#(
  parameter int unsigned ROUNDS = DES_ROUNDS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        mode,
  input  logic [63:0] din,
  input  logic [63:0] key,
  output logic [63:0] dout,
  output logic        busy,
  output logic        done
);
  logic        load, round_en, last_round;
  logic [3:0]  round_idx;
  logic [47:0] subkey;
  logic [31:0] l_q, r_q, l_n, r_n;
  logic [63:0] ip_out, fp_out;

  des_ctrl #(.ROUNDS(ROUNDS)) u_ctrl (
    .clk, .rst_n, .start, .load, .round_en, .round_idx, .last_round, .done
  );

  des_key_schedule u_ks (
    .clk, .rst_n, .load, .key, .mode, .round_en, .round_idx, .subkey
  );

  des_ip u_ip (.x(din), .y(ip_out));

  des_feistel u_round (
    .l_in(l_q), .r_in(r_q), .subkey, .l_out(l_n), .r_out(r_n)
  );

  // The last round's halves are swapped before the final permutation.
  des_fp u_fp (.x({r_n, l_n}), .y(fp_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_q  <= '0;
      r_q  <= '0;
      dout <= '0;
    end else if (load) begin
      {l_q, r_q} <= ip_out;
    end else if (round_en) begin
      l_q <= l_n;
      r_q <= r_n;
      if (last_round) dout <= fp_out;
    end
  end

  assign busy = round_en;
endmodule
