// tb_ref_pkg: reference arithmetic for the RM-PRNG testbenches, written with
// plain integer arithmetic (64-bit multiply, %, +) rather than the adder,
// counter and rotation structure of the RTL.
//
//  lgm      : X' = floor(X * (2^32 - X) / 2^30) mod 2^32  (4 X (1 - X))
//  dx_next  : Y' = (Y_t + (2^28 + 2^8) * Y_{t-7}) mod (2^31 - 1)
//  mod_m    : v mod (2^31 - 1)
//  rm_prng_ref : the whole generator (state, DX words, reseeding counter).
package tb_ref_pkg;

  localparam longint unsigned M = 64'h7FFF_FFFF;

  function automatic logic [31:0] lgm(input logic [31:0] x);
    longint unsigned xv, om, pr;
    xv = 64'(x);
    om = (64'h1_0000_0000 - xv) & 64'hFFFF_FFFF;
    pr = xv * om;
    return 32'((pr >> 30) & 64'hFFFF_FFFF);
  endfunction

  function automatic longint unsigned mod_m(input longint unsigned v);
    return v % M;
  endfunction

  function automatic logic [30:0] dx_next(input logic [30:0] yt, input logic [30:0] yt7);
    longint unsigned b;
    b = (64'd1 << 28) + (64'd1 << 8);
    return 31'(mod_m(mod_m(64'(yt)) + b * mod_m(64'(yt7))));
  endfunction

  class rm_prng_ref;
    logic [31:0] x;
    logic [30:0] y [8];
    int unsigned rc;
    int unsigned tr;
    logic [4:0]  r;

    function new(int unsigned tr_i, logic [4:0] r_i);
      tr = tr_i;
      r  = r_i;
    endfunction

    function void start(logic [31:0] s1, logic [30:0] s2);
      x  = s1;
      foreach (y[i]) y[i] = 31'(mod_m(64'(s2)));
      rc = 0;
    endfunction

    function logic [30:0] y_next();
      return dx_next(y[0], y[7]);
    endfunction

    // Key word OUT_{t+1} for the current state.
    function logic [31:0] key();
      logic [31:0] xn;
      xn = lgm(x);
      return {xn[31], xn[30:0] ^ y_next()};
    endfunction

    function void step(output bit fixed, output bit period);
      logic [31:0] xn;
      logic [30:0] yn;
      xn     = lgm(x);
      yn     = y_next();
      fixed  = (xn == x);
      period = (rc == tr - 1);
      if (fixed || period) begin
        x  = {xn[31:5], r};
        rc = 0;
      end else begin
        x  = xn;
        rc = rc + 1;
      end
      for (int i = 7; i > 0; i--) y[i] = y[i-1];
      y[0] = yn;
    endfunction
  endclass

endpackage
