// crypto_top: stream-cipher datapath built around an RM-PRNG. One generator
// supplies the key stream to an encryption unit and to a decryption unit:
// plain text -> encryption (XOR key) -> cipher text -> decryption (XOR the
// same key) -> plain text, as in the system diagram of the design.
//
// Flow: after reset, pulse start for one cycle with the two seeds. From the
// next cycle pt_ready is high; every cycle with pt_valid and pt_ready high
// consumes one plain-text word and one key word. The cipher-text word
// appears on ct_valid/ct_data one cycle later, and the recovered plain text
// on dec_valid/dec_data one cycle after that. The key word used for a
// plain-text word is held in a register for one cycle so that the
// decryption unit XORs the cipher text with exactly that word. Holding
// pt_valid low stalls the key stream. Starting again with the same seeds
// restarts the same key stream.
//
// reseed_fixed and reseed_period report, for the word being consumed in this
// cycle, which reseeding condition of the generator is active; key is the
// current key word. These are observation outputs. The handshake, the key
// delay register and the observation outputs are this design's choices.
module crypto_top
  import rm_prng_pkg::*;
#(
  parameter int unsigned     TR = RS_TR,
  parameter logic [RS_L-1:0] R  = RS_R
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  xword_t seed1,
  input  yword_t seed2,
  input  logic   pt_valid,
  output logic   pt_ready,
  input  xword_t pt_data,
  output logic   ct_valid,
  output xword_t ct_data,
  output logic   dec_valid,
  output xword_t dec_data,
  output xword_t key,
  output logic   reseed_fixed,
  output logic   reseed_period
);

  logic   key_valid, accept, reseed_unused;
  xword_t key_d;

  assign pt_ready = key_valid & ~start;
  assign accept   = pt_valid & pt_ready;

  rm_prng #(.TR(TR), .R(R)) u_prng (
    .clk, .rst_n, .start, .seed1, .seed2,
    .next(accept), .key, .key_valid,
    .reseed(reseed_unused), .hit_fixed(reseed_fixed), .hit_period(reseed_period)
  );

  encryptor u_enc (
    .clk, .rst_n, .in_valid(accept), .plain(pt_data), .key,
    .out_valid(ct_valid), .cipher(ct_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      key_d <= '0;
    else if (accept) key_d <= key;
  end

  decryptor u_dec (
    .clk, .rst_n, .in_valid(ct_valid), .cipher(ct_data), .key(key_d),
    .out_valid(dec_valid), .plain(dec_data)
  );

  // The decryption unit sees each cipher word exactly one cycle after the
  // encryption unit accepted the plain word.
  a_dec_follows_ct: assert property (@(posedge clk) disable iff (!rst_n)
    ct_valid |=> dec_valid);

endmodule
