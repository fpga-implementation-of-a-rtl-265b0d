// dx_generator: auxiliary linear generator (ALG) of the RM-PRNG, a DX-8
// multiple recursive generator
//   Y_{t+1} = Y_t + B_DX * Y_{t-7}  (mod 2^31 - 1),  B_DX = 2^28 + 2^8.
//
// An 8-word register file holds Y_t ... Y_{t-7}. Y_{t-7} is rotated left by
// 28 and by 8 bits (CLS-28, CLS-8), which gives the two partial products of
// B_DX * Y_{t-7} modulo 2^31 - 1. A circular 3-2 counter merges them with
// Y_t into two operands, and the 31-bit end-around-carry adder produces
// Y_{t+1}. The datapath and its constants follow the design description.
//
// Interface and timing: y_next is Y_{t+1}, combinational from the register
// file. A synchronous start loads all eight words with seed2 (this design's
// choice: the description shows one seed input); seed2 must not be 0 or
// 2^31 - 1, which are both zero modulo 2^31 - 1 and would stall the
// generator at zero. Each cycle with step high shifts Y_{t+1} in. start has
// priority over step. One new word per step, no latency beyond the register.
module dx_generator
  import rm_prng_pkg::*;
#(
  parameter int unsigned K  = DX_K,
  parameter int unsigned S1 = DX_S1,
  parameter int unsigned S2 = DX_S2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  yword_t seed2,
  input  logic   step,
  output yword_t y_next,
  output yword_t y_cur
);

  yword_t regs [K];     // regs[0] = Y_t, regs[K-1] = Y_{t-K+1}
  yword_t pp1, pp2, csa_s, csa_c;
  logic   eac_unused;

  cls #(.W(YW), .SHIFT(S1)) u_cls_hi (.a(regs[K-1]), .y(pp1));
  cls #(.W(YW), .SHIFT(S2)) u_cls_lo (.a(regs[K-1]), .y(pp2));

  circular_csa #(.W(YW)) u_csa (
    .a(regs[0]), .b(pp1), .c(pp2), .sum(csa_s), .carry(csa_c)
  );

  eac_cla u_add (.a(csa_s), .b(csa_c), .s(y_next), .eac(eac_unused));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(K); i++) regs[i] <= '0;
    end else if (start) begin
      for (int i = 0; i < int'(K); i++) regs[i] <= seed2;
    end else if (step) begin
      regs[0] <= y_next;
      for (int i = 1; i < int'(K); i++) regs[i] <= regs[i-1];
    end
  end

  assign y_cur = regs[0];

  // A seed that is zero modulo 2^31 - 1 would hold the generator at zero.
  a_seed2_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> (seed2 != '0 && seed2 != {YW{1'b1}}))
    else $error("dx_generator: seed2 is zero modulo 2^31 - 1");

endmodule
