// bch_syndrome_gen: syndrome generator of the parallel decoder.
//
// The received word v = {message', parity'} is split; the six parity check
// sums are recomputed from the received message bits (the same XOR trees as
// the encoder) and XORed with the received parity bits. The 6-bit result is
// the syndrome: zero for a valid code word, the parity-check column of the
// flipped bit for a single error. Combinational.
//
// That the syndrome comes from recomputing the check sums follows the
// description of the decoder ("a parity check equation for each code word
// bit"); the exact gate list is this design's own.
module bch_syndrome_gen
  import bch_pkg::*;
(
  input  codeword_t rx_word,
  output syndrome_t syndrome
);

  message_t rx_msg;
  parity_t  rx_par;

  always_comb begin
    {rx_msg, rx_par} = rx_word;
    syndrome         = check_sums(rx_msg) ^ rx_par;
  end

endmodule
