// lfsr_key: Fibonacci linear feedback shift register used to scramble the key.
//
// The register holds bits B(WIDTH-1) .. B0. Each `step` shifts every bit one
// place toward B0 (B0 is the serial output) and writes into B(WIDTH-1) the
// feedback bit B_M, the XOR of the bits selected by TAPS (bit i of TAPS selects
// B_i). The default taps give x^64+x^63+x^61+x^60+1, a maximal-length
// polynomial, so the feedback is B0 ^ B60 ^ B61 ^ B63. `load` writes the seed
// (the user key); an all-zero seed, which would never leave zero, is replaced
// by ZERO_SEED. load has priority over step; both take effect at the next
// clock edge. The shift structure follows the usual LFSR drawing; the
// polynomial, the zero-seed rule and the load/step controls are this design's.
module lfsr_key #(
  parameter int unsigned       WIDTH     = 64,
  parameter logic [WIDTH-1:0]  TAPS      = 64'hB000_0000_0000_0001,
  parameter logic [WIDTH-1:0]  ZERO_SEED = 64'h0123_4567_89AB_CDEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             step,
  input  logic [WIDTH-1:0] seed,
  output logic [WIDTH-1:0] state
);
  logic feedback;

  always_comb feedback = ^(state & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= ZERO_SEED;
    else if (load) state <= (seed == '0) ? ZERO_SEED : seed;
    else if (step) state <= {feedback, state[WIDTH-1:1]};
  end
endmodule
