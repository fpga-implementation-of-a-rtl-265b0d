// lgm_next_state: next-state construction of the chaotic (nonlinear) part of
// the RM-PRNG, the digitized logistic map X_{t+1} = 4 * X_t * (1 - X_t).
//
// X is read as an unsigned fraction in [0,1) with W bits. 1 - X is formed as
// the W-bit two's complement of X, the full 2W-bit product X*(1-X) is taken,
// and the factor 4 is a left shift by 2: the result is bits [2W-3 : W-2] of
// the product. The map with gamma = 4 and the shift-by-2 follow the design
// description; computing 1 - X as the W-bit negation (so X = 0.5 maps to 0,
// since 1.0 is not representable) is this design's choice.
//
// Purely combinational: x_next is valid in the same cycle as x.
module lgm_next_state #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] x_next
);

  logic [W-1:0]   one_minus_x;
  logic [2*W-1:0] prod;

  always_comb begin
    one_minus_x = -x;
    prod        = {{W{1'b0}}, x} * {{W{1'b0}}, one_minus_x};
    x_next      = prod[2*W-3 -: W];
  end

endmodule
