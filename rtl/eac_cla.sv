// eac_cla: 31-bit end-around-carry carry-lookahead adder (EAC-CLA), the final
// adder of the DX generator. It returns a + b modulo 2^31 - 1.
//
// The word is cut into four groups, bits [6:0] (7 bits), [14:7], [22:15] and
// [30:23] (8 bits each), as in the adder's block diagram. Each group has a PG
// generator. The EAC generator combines the four group generate/propagate
// pairs into the carry that leaves bit 30 with carry-in 0; that carry has
// weight 2^31 = 1 (mod 2^31 - 1) and is fed back as the carry into bit 0.
// The internal-carry (IC) generator then produces the group carry-ins c7,
// c15 and c23 from the group signals and the EAC, and the four CLA stages
// form the sum bits. There is no ripple through the wrap-around, so no
// combinational loop.
//
// When a + b == 2^31 - 1 exactly, no carry is generated and the result is the
// all-ones word, the second representation of zero modulo 2^31 - 1; the DX
// recurrence is unaffected because all its operations are modulo 2^31 - 1.
// Group sizes and the PG/EAC/IC/CLA split follow the design description; the
// carry equations are the standard lookahead ones. Combinational.
module eac_cla (
  input  logic [30:0] a,
  input  logic [30:0] b,
  output logic [30:0] s,
  output logic        eac
);

  logic [30:0] p, g;
  logic [3:0]  gg, gp;
  logic        c7, c15, c23;

  eac_pg_gen #(.N(7)) u_pg0 (.a(a[6:0]),   .b(b[6:0]),   .p(p[6:0]),   .g(g[6:0]),   .gg(gg[0]), .gp(gp[0]));
  eac_pg_gen #(.N(8)) u_pg1 (.a(a[14:7]),  .b(b[14:7]),  .p(p[14:7]),  .g(g[14:7]),  .gg(gg[1]), .gp(gp[1]));
  eac_pg_gen #(.N(8)) u_pg2 (.a(a[22:15]), .b(b[22:15]), .p(p[22:15]), .g(g[22:15]), .gg(gg[2]), .gp(gp[2]));
  eac_pg_gen #(.N(8)) u_pg3 (.a(a[30:23]), .b(b[30:23]), .p(p[30:23]), .g(g[30:23]), .gg(gg[3]), .gp(gp[3]));

  // EAC generator: carry out of the full word with carry-in 0.
  always_comb begin
    eac = gg[3]
        | (gp[3] & gg[2])
        | (gp[3] & gp[2] & gg[1])
        | (gp[3] & gp[2] & gp[1] & gg[0]);
  end

  // IC generator: group carry-ins, the EAC entering at bit 0.
  always_comb begin
    c7  = gg[0] | (gp[0] & eac);
    c15 = gg[1] | (gp[1] & gg[0]) | (gp[1] & gp[0] & eac);
    c23 = gg[2] | (gp[2] & gg[1]) | (gp[2] & gp[1] & gg[0])
        | (gp[2] & gp[1] & gp[0] & eac);
  end

  eac_cla_group #(.N(7)) u_cla0 (.p(p[6:0]),   .g(g[6:0]),   .cin(eac), .s(s[6:0]));
  eac_cla_group #(.N(8)) u_cla1 (.p(p[14:7]),  .g(g[14:7]),  .cin(c7),  .s(s[14:7]));
  eac_cla_group #(.N(8)) u_cla2 (.p(p[22:15]), .g(g[22:15]), .cin(c15), .s(s[22:15]));
  eac_cla_group #(.N(8)) u_cla3 (.p(p[30:23]), .g(g[30:23]), .cin(c23), .s(s[30:23]));

endmodule
