// eac_cla_group: N-bit carry-lookahead adder stage of the end-around-carry
// adder.
//
// It takes the bit propagate/generate signals of its group from the PG
// generator and the group carry-in from the internal-carry (IC) generator,
// computes every internal carry c[i+1] = g[i] | p[i] & c[i] in lookahead form
// and returns the sum bits s[i] = p[i] ^ c[i]. Combinational.
module eac_cla_group #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] p,
  input  logic [N-1:0] g,
  input  logic         cin,
  output logic [N-1:0] s
);

  logic cc;

  always_comb begin
    cc = cin;
    for (int i = 0; i < int'(N); i++) begin
      s[i] = p[i] ^ cc;
      cc   = g[i] | (p[i] & cc);
    end
  end

endmodule
