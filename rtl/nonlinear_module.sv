// nonlinear_module: chaotic half of the RM-PRNG, a 32-bit state register and
// the logistic-map next-state construction X_{t+1} = F(X_t).
//
// A synchronous start loads the register with seed1. On every clock edge
// with step high it loads Z_{t+1}, the next state as passed through the
// reseeding multiplexer of the reseeding module (equal to X_{t+1} unless a
// reseeding is active). start has priority over step. x_cur and x_next are
// both available in the same cycle; x_next is combinational from x_cur.
// Structure follows the design description; the asynchronous active-low
// reset to zero is this design's choice.
module nonlinear_module
  import rm_prng_pkg::*;
#(
  parameter int unsigned W = XW
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] seed1,
  input  logic         step,
  input  logic [W-1:0] z_next,
  output logic [W-1:0] x_cur,
  output logic [W-1:0] x_next
);

  lgm_next_state #(.W(W)) u_f (.x(x_cur), .x_next);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     x_cur <= '0;
    else if (start) x_cur <= seed1;
    else if (step)  x_cur <= z_next;
  end

endmodule
