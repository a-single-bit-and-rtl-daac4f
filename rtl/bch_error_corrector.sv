// bch_error_corrector: error pattern generator with one correction unit per
// code word bit.
//
// Correction unit j compares the syndrome with column j of the parity-check
// matrix (bch_pkg::h_column). All 22 comparisons run side by side; their
// results form the error pattern e, which is one-hot when the syndrome names
// a single bit and zero otherwise (no error, or an error the code cannot
// locate). The corrected word is v XOR e. The location output is the index j
// of the flipped code word bit (21..6 are message bits 15..0, 5..0 are parity
// bits 5..0) and is qualified by loc_valid. Combinational.
//
// Per-bit correction units follow the document's parallel decoder; the
// location encoding is this design's own.
module bch_error_corrector
  import bch_pkg::*;
(
  input  codeword_t rx_word,
  input  syndrome_t syndrome,
  output codeword_t err_pattern,
  output codeword_t corrected,
  output location_t err_loc,
  output logic      loc_valid
);

  always_comb begin
    err_loc = '0;
    for (int unsigned j = 0; j < N; j++) begin
      err_pattern[j] = (syndrome == h_column(j));
      if (err_pattern[j]) err_loc = location_t'(j);
    end
    loc_valid = |err_pattern;
    corrected = rx_word ^ err_pattern;
  end

endmodule
