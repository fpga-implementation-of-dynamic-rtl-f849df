// dynamic_key_unit: produces the DES key from the user key in one of three ways.
//
// SEL = 00 scrambles the key with the LFSR, SEL = 11 runs the logistic
// (chaotic) map seeded with it, and SEL = 01 or 10 passes it unchanged; a
// 4-to-1 multiplexer picks the result. Only the generator that SEL selects is
// clocked, so the two never work at the same time.
//
// Operation: `start` (while idle) captures SEL and seeds both generators with
// key_in. The selected generator is then stepped LFSR_STEPS (LFSR) or
// LOG_ITERS (logistic) times, one step per cycle; the direct key needs none.
// If the resulting key is one of the DES weak or semi-weak keys, the generator
// is stepped once more, and again until it is not (each extra step is counted
// in `retries`). `key_valid` then pulses for one cycle with the key on
// `key_out`; key_out stays stable until the next start, except in the direct
// modes, where it follows key_in. A weak direct key cannot be replaced and is
// reported on `is_weak`.
//
// Timing: start in cycle 0; key_valid high in cycle 2 (direct), 2 + LFSR_STEPS
// (LFSR) or 2 + LOG_ITERS (logistic), plus one cycle per retry. The step
// counts, seeding by the user key and the retry rule are this design's choices.
module dynamic_key_unit
  import des_pkg::*;
#(
  parameter int unsigned LFSR_STEPS = 64,
  parameter int unsigned LOG_ITERS  = 16,
  parameter logic [15:0] MU_Q14     = 16'd65372
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [1:0]  sel,
  input  logic [63:0] key_in,
  output logic [63:0] key_out,
  output logic        key_valid,
  output logic        busy,
  output logic        is_weak,
  output logic [7:0]  retries
);
  typedef enum logic {IDLE, GEN} state_e;
  state_e    state;
  key_sel_e  sel_q;
  logic [15:0] remaining;
  logic [63:0] lfsr_q, chaos_q;
  logic        load, step, is_gen;

  always_comb begin
    load   = (state == IDLE) && start;
    is_gen = (sel_q == SEL_LFSR) || (sel_q == SEL_CHAOS);
    // Step while iterations remain, or once more when the key came out weak.
    step   = (state == GEN) && is_gen && ((remaining != '0) || is_weak);
  end

  lfsr_key u_lfsr (
    .clk, .rst_n, .load, .step(step && (sel_q == SEL_LFSR)),
    .seed(key_in), .state(lfsr_q)
  );

  logistic_key #(.MU_Q14(MU_Q14)) u_chaos (
    .clk, .rst_n, .load, .step(step && (sel_q == SEL_CHAOS)),
    .seed(key_in), .y(chaos_q)
  );

  key_mux u_mux (
    .a(lfsr_q), .b(key_in), .c(key_in), .d(chaos_q),
    .sel(sel_q), .y(key_out)
  );

  weak_key_detect u_weak (.key(key_out), .is_weak);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      sel_q     <= SEL_DIRECT1;
      remaining <= '0;
      retries   <= '0;
      key_valid <= 1'b0;
    end else begin
      key_valid <= 1'b0;
      case (state)
        IDLE: if (start) begin
          state   <= GEN;
          sel_q   <= key_sel_e'(sel);
          retries <= '0;
          unique case (key_sel_e'(sel))
            SEL_LFSR:  remaining <= 16'(LFSR_STEPS);
            SEL_CHAOS: remaining <= 16'(LOG_ITERS);
            default:   remaining <= '0;
          endcase
        end
        GEN: begin
          if (remaining != '0) begin
            remaining <= remaining - 16'd1;
          end else if (step) begin
            if (retries != '1) retries <= retries + 8'd1;
          end else begin
            key_valid <= 1'b1;
            state     <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state == GEN);

  // A key delivered by a generator is never weak or semi-weak.
  a_no_weak_generated: assert property (@(posedge clk) disable iff (!rst_n)
    key_valid && is_gen |-> !is_weak);
  // A new generation cannot start while one is running.
  a_no_start_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !load);
endmodule
