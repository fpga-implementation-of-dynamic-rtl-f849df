// des_dynamic_top: DES with a dynamic key generation unit in front of it.
//
// Plain DES has only 2^56 keys. Here the user key does not go to DES
// directly: a selector SEL chooses whether DES gets the key itself
// (SEL = 01 or 10), the key scrambled by a 64-bit LFSR (SEL = 00) or a key
// produced by a chaotic logistic map seeded with it (SEL = 11). Both ends of a
// link must agree on SEL, which adds to what an attacker has to guess. The DES
// engine itself is standard and iterative: one Feistel round in hardware,
// reused 16 times.
//
// Interface: raise `en` while `busy` is low to start; `din`, `key`, `sel` and
// `mode` (0 encrypt, 1 decrypt) are captured in that cycle. The key unit then
// generates the DES key, after which the DES core runs. `done` pulses for one
// cycle when `dout` holds the result; dout is kept until the next result.
// `weak_key` tells whether the key used was a DES weak or semi-weak key, which
// only a direct key can be (generated weak keys are skipped), and
// `key_retries` how many weak generated keys were skipped in the last run.
//
// Timing from the `en` cycle (cycle 0): the key unit starts in cycle 1, its
// key is ready in cycle 3 + G, where G is 0 (direct), LFSR_STEPS (LFSR) or
// LOG_ITERS (logistic) plus one per weak-key retry, and `done` rises 17 cycles
// later, in cycle 20 + G. The ports follow the design's block diagram (KEY,
// DIN, SEL, EN, MODE, CLK in, DOUT out); rst_n, busy, done and weak_key are
// additions of this design.
module des_dynamic_top
  import des_pkg::*;
#(
  parameter int unsigned LFSR_STEPS = 64,
  parameter int unsigned LOG_ITERS  = 16,
  parameter logic [15:0] MU_Q14     = 16'd65372
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        mode,
  input  logic [1:0]  sel,
  input  logic [63:0] din,
  input  logic [63:0] key,
  output logic [63:0] dout,
  output logic        done,
  output logic        busy,
  output logic        weak_key,
  output logic [7:0]  key_retries
);
  typedef enum logic [1:0] {IDLE, KEYGEN, CIPHER} state_e;
  state_e      state;
  logic [63:0] din_q, key_q, dyn_key;
  logic [1:0]  sel_q;
  logic        mode_q;
  logic        kg_start, kg_valid, kg_weak, des_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      din_q    <= '0;
      key_q    <= '0;
      sel_q    <= '0;
      mode_q   <= 1'b0;
      weak_key <= 1'b0;
    end else begin
      case (state)
        IDLE: if (en) begin
          din_q  <= din;
          key_q  <= key;
          sel_q  <= sel;
          mode_q <= mode;
          state  <= KEYGEN;
        end
        KEYGEN: if (kg_valid) begin
          weak_key <= kg_weak;
          state    <= CIPHER;
        end
        CIPHER: if (des_done) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  // The key unit is started once, in the first KEYGEN cycle.
  logic kg_started;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                kg_started <= 1'b0;
    else if (state != KEYGEN)  kg_started <= 1'b0;
    else                       kg_started <= 1'b1;
  end
  assign kg_start = (state == KEYGEN) && !kg_started;

  dynamic_key_unit #(
    .LFSR_STEPS(LFSR_STEPS), .LOG_ITERS(LOG_ITERS), .MU_Q14(MU_Q14)
  ) u_keygen (
    .clk, .rst_n, .start(kg_start), .sel(sel_q), .key_in(key_q),
    .key_out(dyn_key), .key_valid(kg_valid), .busy(), .is_weak(kg_weak),
    .retries(key_retries)
  );

  des_core u_des (
    .clk, .rst_n, .start(kg_valid), .mode(mode_q), .din(din_q), .key(dyn_key),
    .dout, .busy(), .done(des_done)
  );

  assign done = des_done;
  assign busy = (state != IDLE);

  // The DES core is started only with a freshly generated key, and finishes
  // only in the CIPHER state.
  a_key_then_cipher: assert property (@(posedge clk) disable iff (!rst_n)
    kg_valid |-> state == KEYGEN);
  a_done_in_cipher: assert property (@(posedge clk) disable iff (!rst_n)
    des_done |-> state == CIPHER);
endmodule
