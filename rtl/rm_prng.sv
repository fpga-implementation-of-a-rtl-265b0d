// rm_prng: reseeding-mixing pseudo random number generator (RM-PRNG) that
// produces one 32-bit key word per clock.
//
// Three parts, wired as in the generator's block diagram:
//  * nonlinear module: state register X_t and logistic map X_{t+1} = F(X_t);
//  * reseeding module: on a fixed point (X_t == X_{t+1}) or every T_R steps
//    the L LSBs of the next state are replaced by the pattern R before it is
//    written back, which breaks the short cycles of the digitized map;
//  * vector mixing module: a DX-8 generator modulo 2^31 - 1 produces Y_{t+1},
//    and the key is OUT_{t+1} = { X_{t+1}[31], X_{t+1}[30:0] ^ Y_{t+1} }.
// The output is taken from X_{t+1} as computed by the map, before the
// reseeding multiplexer, as the block diagram draws it.
//
// Interface and timing: a one-cycle start loads seed1 into the state register
// and seed2 into all eight DX words and raises key_valid. From then on key is
// OUT_{t+1}, combinational from the registers; each cycle with next high
// consumes that word and advances both generators, so a new word is ready
// in the following cycle (one word per clock at full rate). next is ignored
// while key_valid is low or start is high. The start/next handshake is this
// design's choice.
module rm_prng
  import rm_prng_pkg::*;
#(
  parameter int unsigned     TR = RS_TR,
  parameter logic [RS_L-1:0] R  = RS_R
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  xword_t seed1,
  input  yword_t seed2,
  input  logic   next,
  output xword_t key,
  output logic   key_valid,
  output logic   reseed,
  output logic   hit_fixed,
  output logic   hit_period
);

  xword_t x_cur, x_next, z_next;
  yword_t y_next_unused;
  logic   step;

  assign step = next & key_valid & ~start;

  nonlinear_module #(.W(XW)) u_nlm (
    .clk, .rst_n, .start, .seed1, .step, .z_next, .x_cur, .x_next
  );

  reseeding_module #(.W(XW), .L(RS_L), .TR(TR), .R(R)) u_rsm (
    .clk, .rst_n, .start, .step, .x_cur, .x_next,
    .z_next, .reseed, .hit_fixed, .hit_period
  );

  vector_mixing_module u_vmm (
    .clk, .rst_n, .start, .seed2, .step, .x_next,
    .y_next(y_next_unused), .out(key)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     key_valid <= 1'b0;
    else if (start) key_valid <= 1'b1;
  end

endmodule
