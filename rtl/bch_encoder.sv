// bch_encoder: systematic encoder of the (22,16) parallel code.
//
// Each of the six parity bits is one XOR tree over a fixed subset of the
// sixteen message bits (the parity check sums listed in bch_pkg::CHECK_ROW).
// The code word is the message followed by the parity bits:
// codeword = {message, parity}. Purely combinational, no clock; the result
// is valid in the same cycle as the message. The code is systematic, so
// codeword[21:6] is the message itself, wired straight through.
//
// The check sums are the published parity equations; the ordering of the
// code word follows the published example (message 1111111111111000 gives
// parity 111110 and code word 1111111111111000111110).
module bch_encoder
  import bch_pkg::*;
(
  input  message_t  message,
  output parity_t   parity,
  output codeword_t codeword
);

  always_comb begin
    parity   = check_sums(message);
    codeword = {message, parity};
  end

endmodule
