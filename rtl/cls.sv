// cls: circular left shift of a W-bit word by SHIFT positions (CLS-28 and
// CLS-8 of the DX generator).
//
// With the modulus 2^W - 1, multiplying by 2^SHIFT is exactly a rotation, so
// this block forms the partial products B_DX * Y = (2^28 + 2^8) * Y of the
// DX recurrence without a multiplier. Combinational; no clock.
module cls #(
  parameter int unsigned W     = 31,
  parameter int unsigned SHIFT = 8
) (
  input  logic [W-1:0] a,
  output logic [W-1:0] y
);

  localparam int unsigned S = SHIFT % W;

  always_comb begin
    if (S == 0) y = a;
    else        y = (a << S) | (a >> (W - S));
  end

endmodule
