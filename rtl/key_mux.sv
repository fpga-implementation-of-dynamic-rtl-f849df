// key_mux: 4-to-1 multiplexer that hands one candidate key to DES.
//
// Input a carries the LFSR key (SEL = 00), b and c the user key unchanged
// (SEL = 01 and 10) and d the logistic-map key (SEL = 11), matching the
// multiplexer of the dynamic key generation unit. Combinational.
module key_mux
  import des_pkg::*;
#(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  input  logic [WIDTH-1:0] d,
  input  logic [1:0]       sel,
  output logic [WIDTH-1:0] y
);
  always_comb begin
    unique case (key_sel_e'(sel))
      SEL_LFSR:    y = a;
      SEL_DIRECT1: y = b;
      SEL_DIRECT2: y = c;
      SEL_CHAOS:   y = d;
    endcase
  end
endmodule
