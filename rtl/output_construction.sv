// output_construction: output stage of the RM-PRNG vector mixing module.
//
// The 31 LSBs of the chaotic state X_{t+1} are XORed with the 31-bit DX word
// Y_{t+1}; the MSB of X_{t+1} is passed on unchanged as the MSB of the
// 32-bit output:  OUT = { X[31], X[30:0] ^ Y }.
// This follows the design description. Combinational.
module output_construction
  import rm_prng_pkg::*;
(
  input  xword_t x,
  input  yword_t y,
  output xword_t out
);

  always_comb out = {x[XW-1], x[YW-1:0] ^ y};

endmodule
