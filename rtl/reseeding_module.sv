// reseeding_module: reseeding control unit (RCU), reseeding counter (RC) and
// reseeding multiplexer (RMux) of the RM-PRNG.
//
// For every generated state the RCU compares X_t with X_{t+1} (fixed-point
// condition) and checks whether RC has reached the reseeding period T_R.
// If either holds, reseeding is active: the value written back to the state
// register, Z_{t+1}, keeps the 32-L MSBs of X_{t+1} and takes the fixed
// L-bit pattern R as its L LSBs, and RC restarts from zero. Otherwise
// Z_{t+1} = X_{t+1} and RC counts up. Replacing the LSBs keeps the
// perturbation below 2^L / 2^32 of full scale.
//
// The fixed-point test, the counter, the OR of the two conditions, the
// multiplexer and L = 5 follow the design description. T_R and R are not
// given there; the defaults (T_R = 1021, a prime, and R = 10011b) are this
// design's choice. RC holds the number of steps since the last reseeding,
// so with no fixed points reseeding happens on every T_R-th step.
//
// Interface and timing: z_next, reseed and the two cause flags are
// combinational from x_cur, x_next and RC; RC updates on clock edges with
// step high and is cleared by start.
module reseeding_module
  import rm_prng_pkg::*;
#(
  parameter int unsigned          W  = XW,
  parameter int unsigned          L  = RS_L,
  parameter int unsigned          TR = RS_TR,
  parameter logic [RS_L-1:0]      R  = RS_R
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         step,
  input  logic [W-1:0] x_cur,
  input  logic [W-1:0] x_next,
  output logic [W-1:0] z_next,
  output logic         reseed,
  output logic         hit_fixed,
  output logic         hit_period
);

  localparam int unsigned RCW = $clog2(TR + 1);

  logic [RCW-1:0] rc;

  always_comb begin
    hit_fixed  = (x_cur == x_next);
    hit_period = (rc == RCW'(TR - 1));
    reseed     = hit_fixed | hit_period;
    z_next     = reseed ? {x_next[W-1:L], R[L-1:0]} : x_next;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      rc <= '0;
    else if (start)  rc <= '0;
    else if (step)   rc <= reseed ? '0 : rc + 1'b1;
  end

  initial assert (L >= 1 && L <= RS_L && L < W)
    else $error("reseeding_module: L must be 1..%0d", RS_L);
  initial assert (TR >= 1)
    else $error("reseeding_module: TR must be at least 1");

endmodule
