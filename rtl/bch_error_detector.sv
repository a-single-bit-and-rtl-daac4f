// bch_error_detector: classifies a decoded word.
//
// A zero syndrome means the received word is a code word (ST_NO_ERROR). A
// nonzero syndrome that one correction unit recognised means a single bit
// error that has been corrected (ST_CORRECTED). Any other nonzero syndrome
// is an error of two or more bits that the code detects but cannot correct
// (ST_UNCORRECTABLE). Also outputs a plain error flag (any nonzero syndrome).
// Combinational.
//
// The document names an error detector that flags errors the decoder cannot
// correct; the three-way status is this design's own encoding of that.
module bch_error_detector
  import bch_pkg::*;
(
  input  syndrome_t syndrome,
  input  codeword_t err_pattern,
  output logic      err_detected,
  output status_e   status
);

  always_comb begin
    err_detected = |syndrome;
    if (!err_detected)     status = ST_NO_ERROR;
    else if (|err_pattern) status = ST_CORRECTED;
    else                   status = ST_UNCORRECTABLE;
  end

endmodule
