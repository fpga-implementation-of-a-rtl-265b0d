// rm_prng_pkg: widths and constants shared by the RM-PRNG key generator and
// the XOR encryption/decryption units.
//
// The 32-bit state and output width, the 31-bit DX word (arithmetic modulo
// 2^31 - 1), the DX order K = 8, the two shift amounts 28 and 8
// (B_DX = 2^28 + 2^8) and L = 5 follow the design description. The
// reseeding pattern R and the reseeding period T_R are this design's own
// choices (a prime period, as the design guidelines ask for).
package rm_prng_pkg;

  localparam int unsigned XW      = 32;          // chaotic state / key width
  localparam int unsigned YW      = 31;          // DX generator word width
  localparam int unsigned DX_K    = 8;           // DX order (8-word register)
  localparam int unsigned DX_S1   = 28;          // B_DX = 2^28 + 2^8
  localparam int unsigned DX_S2   = 8;
  localparam int unsigned RS_L    = 5;           // number of reseeded LSBs
  localparam int unsigned RS_TR   = 1021;        // reseeding period (prime)
  localparam logic [RS_L-1:0] RS_R = 5'b10011;   // fixed reseeding pattern

  typedef logic [XW-1:0] xword_t;
  typedef logic [YW-1:0] yword_t;

endpackage
