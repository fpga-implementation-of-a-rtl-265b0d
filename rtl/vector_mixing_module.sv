// vector_mixing_module: the long-period linear half of the RM-PRNG. It holds
// the DX generator (the auxiliary linear generator) and the output
// construction that mixes the generator word Y_{t+1} with the chaotic state
// X_{t+1} into the 32-bit output OUT_{t+1}.
//
// Interface and timing: out is combinational from x_next and the DX register
// file; start loads the DX registers from seed2; step advances the DX
// generator by one word in the same cycle as the chaotic state advances.
module vector_mixing_module
  import rm_prng_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  yword_t seed2,
  input  logic   step,
  input  xword_t x_next,
  output yword_t y_next,
  output xword_t out
);

  yword_t y_cur_unused;

  dx_generator u_alg (
    .clk, .rst_n, .start, .seed2, .step,
    .y_next, .y_cur(y_cur_unused)
  );

  output_construction u_oc (.x(x_next), .y(y_next), .out);

endmodule
