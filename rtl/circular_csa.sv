// circular_csa: circular 3-2 counter of the DX generator.
//
// A row of W full adders reduces three W-bit operands to a sum word and a
// carry word. Because the arithmetic is modulo 2^W - 1, the weight 2^W of the
// carry out of the top full adder equals 1, so that carry is wrapped around
// into bit 0 of the carry word instead of being dropped:
//   a + b + c  ==  sum + carry   (mod 2^W - 1)
// The structure (full-adder row, circular carry) follows the design
// description. Combinational; no clock.
module circular_csa #(
  parameter int unsigned W = 31
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] maj;

  always_comb begin
    sum   = a ^ b ^ c;
    maj   = (a & b) | (a & c) | (b & c);
    carry = {maj[W-2:0], maj[W-1]};
  end

endmodule
