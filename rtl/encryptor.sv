// encryptor: encryption unit. Each accepted plain-text word is XORed with
// the current RM-PRNG key word to give the cipher-text word,
//   C = P ^ K.
// The XOR combination with the generator key follows the design description;
// the 32-bit word width, the valid signal and the output register are this
// design's choice.
//
// Timing: a word presented with in_valid high is registered at the clock
// edge; out_valid and out_data appear in the next cycle (latency 1, one word
// per clock).
module encryptor
  import rm_prng_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  xword_t plain,
  input  xword_t key,
  output logic   out_valid,
  output xword_t cipher
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      cipher    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) cipher <= plain ^ key;
    end
  end

endmodule
