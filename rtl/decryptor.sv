// decryptor: decryption unit. Each accepted cipher-text word is XORed with
// the same RM-PRNG key word that encrypted it, which restores the plain text,
//   P = C ^ K = (P ^ K) ^ K.
// The XOR with the generator key follows the design description; the word
// width, the valid signal and the output register are this design's choice.
//
// Timing: a word presented with in_valid high is registered at the clock
// edge; out_valid and plain appear in the next cycle (latency 1, one word
// per clock).
module decryptor
  import rm_prng_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  xword_t cipher,
  input  xword_t key,
  output logic   out_valid,
  output xword_t plain
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      plain     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) plain <= cipher ^ key;
    end
  end

endmodule
