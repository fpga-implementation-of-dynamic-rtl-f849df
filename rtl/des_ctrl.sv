// des_ctrl: round controller of the iterative DES core.
//
// A two-state machine. In IDLE a start request raises `load` for one cycle,
// during which the core captures the permuted block and the key halves. The
// machine then spends ROUNDS cycles in ROUND, raising `round_en` with the
// 0-based round number on `round_idx`; `done` is high in the cycle after the
// last round, when the core's output register holds the result. Start
// requests during an operation are ignored. The round count follows the DES
// definition; the state encoding and the one-cycle load are this design's.
module des_ctrl #(
  parameter int unsigned ROUNDS = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       load,
  output logic       round_en,
  output logic [3:0] round_idx,
  output logic       last_round,
  output logic       done
);
  typedef enum logic {IDLE, ROUND} state_e;
  state_e state;
  logic [3:0] cnt;

  always_comb begin
    load       = (state == IDLE) && start;
    round_en   = (state == ROUND);
    round_idx  = cnt;
    last_round = round_en && (cnt == 4'(ROUNDS - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      done <= last_round;
      case (state)
        IDLE: if (start) begin
          state <= ROUND;
          cnt   <= '0;
        end
        ROUND: begin
          if (last_round) state <= IDLE;
          else            cnt   <= cnt + 4'd1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  a_round_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    round_en |-> {1'b0, round_idx} < 5'(ROUNDS));
  a_done_after_last: assert property (@(posedge clk) disable iff (!rst_n)
    last_round |=> done);

  initial assert (ROUNDS >= 1 && ROUNDS <= 16)
    else $error("des_ctrl: ROUNDS must be 1..16");
endmodule
