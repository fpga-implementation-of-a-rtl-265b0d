// eac_pg_gen: propagate/generate (PG) generator for one group of the
// end-around-carry carry-lookahead adder.
//
// Per bit it forms p = a ^ b and g = a & b; for the group it forms the group
// generate G (a carry leaves the group with carry-in 0) and the group
// propagate P (a carry-in passes through the whole group). Combinational.
module eac_pg_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] p,
  output logic [N-1:0] g,
  output logic         gg,
  output logic         gp
);

  always_comb begin
    p  = a ^ b;
    g  = a & b;
    gg = 1'b0;
    gp = 1'b1;
    for (int i = 0; i < int'(N); i++) begin
      gg = g[i] | (p[i] & gg);
      gp = gp & p[i];
    end
  end

endmodule
