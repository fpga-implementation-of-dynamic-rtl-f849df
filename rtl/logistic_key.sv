// logistic_key: fixed-point logistic map, the chaotic key generator.
//
// Iterates Y(n+1) = mu * Y(n) * (1 - Y(n)). Y is held as an unsigned 64-bit
// fraction (y = Y * 2^64), so 1 - Y is the two's complement -y. One `step`
// computes the 128-bit product y*(2^64 - y), keeps its upper 64 bits (Y(1-Y),
// at most 1/4), multiplies by mu given as a Q2.14 number (MU_Q14 = 65372 is
// mu = 3.99, inside the chaotic range 3 <= mu <= 4) and drops the 14 fraction
// bits; the result is below 2^64 because mu < 4. Truncation is used
// throughout. `load` writes the seed (the user key); zero, a fixed point of
// the map, is replaced by ZERO_SEED. One iteration per clock; the map follows
// the chaotic generator of the design, the number format and mu are this
// design's.
module logistic_key #(
  parameter logic [15:0] MU_Q14    = 16'd65372,
  parameter logic [63:0] ZERO_SEED = 64'h0123_4567_89AB_CDEF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic        step,
  input  logic [63:0] seed,
  output logic [63:0] y
);
  logic [127:0] prod;
  logic [63:0]  y_1my;
  logic [79:0]  scaled;
  logic [63:0]  y_next;

  always_comb begin
    prod   = {64'd0, y} * {64'd0, -y};
    y_1my  = prod[127:64];
    scaled = {16'd0, y_1my} * {64'd0, MU_Q14};
    y_next = scaled[77:14];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    y <= ZERO_SEED;
    else if (load) y <= (seed == '0) ? ZERO_SEED : seed;
    else if (step) y <= y_next;
  end
endmodule
