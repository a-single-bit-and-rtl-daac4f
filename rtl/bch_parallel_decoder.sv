// bch_parallel_decoder: decodes all 22 bits of a received word at once.
//
// Structure: bch_syndrome_gen forms the 6-bit syndrome, bch_error_corrector
// (one correction unit per code word bit) builds the error pattern and the
// corrected word, bch_error_detector reports whether the word was clean,
// corrected, or carried an uncorrectable error. The decoded message is the
// top sixteen bits of the corrected word. The whole decoder is one
// combinational path from rx_word to the outputs; register the outputs
// outside if a clocked result is needed.
//
// The three-part structure (syndrome generator, error pattern generator,
// error detector) follows the document.
module bch_parallel_decoder
  import bch_pkg::*;
(
  input  codeword_t rx_word,
  output message_t  dec_message,
  output codeword_t corrected,
  output syndrome_t syndrome,
  output location_t err_loc,
  output logic      loc_valid,
  output logic      err_detected,
  output status_e   status
);

  codeword_t err_pattern;

  bch_syndrome_gen u_syn (
    .rx_word (rx_word),
    .syndrome(syndrome)
  );

  bch_error_corrector u_cor (
    .rx_word    (rx_word),
    .syndrome   (syndrome),
    .err_pattern(err_pattern),
    .corrected  (corrected),
    .err_loc    (err_loc),
    .loc_valid  (loc_valid)
  );

  bch_error_detector u_det (
    .syndrome    (syndrome),
    .err_pattern (err_pattern),
    .err_detected(err_detected),
    .status      (status)
  );

  assign dec_message = corrected[N-1:R];

endmodule
