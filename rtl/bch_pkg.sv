// bch_pkg: sizes, types and the parity-check matrix shared by the (22,16)
// single-error-correcting parallel encoder/decoder.
//
// The code carries a 16-bit message and 6 parity bits. The code word is laid
// out message first: codeword[21:6] = message[15:0], codeword[5:0] =
// parity[5:0]. Parity bits 0..4 are the five check sums of a shortened
// Hamming code, parity bit 5 is the XOR of all sixteen message bits. Both the
// encoder and the syndrome generator evaluate the same check sums, so they
// are kept here once, as a table of which message bits feed each sum.
//
// The bit membership of each check sum follows the published parity
// equations; the code word layout follows the published example (message
// 1111111111111000 gives parity 111110). The decoder status encoding is this
// design's own choice.
package bch_pkg;

  localparam int unsigned K = 16;     // message bits
  localparam int unsigned R = 6;      // parity (check) bits
  localparam int unsigned N = K + R;  // code word bits
  localparam int unsigned LOC_W = $clog2(N);

  typedef logic [K-1:0]     message_t;
  typedef logic [R-1:0]     parity_t;
  typedef logic [R-1:0]     syndrome_t;
  typedef logic [N-1:0]     codeword_t;
  typedef logic [LOC_W-1:0] location_t;

  // Outcome of decoding one received word.
  typedef enum logic [1:0] {
    ST_NO_ERROR     = 2'd0,  // syndrome zero, word passed unchanged
    ST_CORRECTED    = 2'd1,  // syndrome matched one bit, that bit flipped
    ST_UNCORRECTABLE= 2'd2   // nonzero syndrome matching no single bit
  } status_e;

  // Row r of the message part of the parity-check matrix: bit i is set when
  // message bit i takes part in check sum r.
  localparam message_t CHECK_ROW [R] = '{
    16'b1010_1101_0101_1011,  // parity(0): m15 m13 m11 m10 m8 m6 m4 m3 m1 m0
    16'b0011_0110_0110_1101,  // parity(1): m13 m12 m10 m9 m6 m5 m3 m2 m0
    16'b1100_0111_1000_1110,  // parity(2): m15 m14 m10 m9 m8 m7 m3 m2 m1
    16'b0000_0111_1111_0000,  // parity(3): m10 .. m4
    16'b1111_1000_0000_0000,  // parity(4): m15 .. m11
    16'b1111_1111_1111_1111   // parity(5): m15 .. m0
  };

  // The six parity check sums of a message.
  function automatic parity_t check_sums(input message_t m);
    parity_t p;
    for (int r = 0; r < R; r++) p[r] = ^(m & CHECK_ROW[r]);
    return p;
  endfunction

  // Column of the full parity-check matrix for code word bit j: the syndrome
  // that a single error on that bit produces.
  function automatic syndrome_t h_column(input int unsigned j);
    syndrome_t c;
    if (j < R) begin
      c = syndrome_t'(1) << j;          // parity bit j checks only itself
    end else begin
      for (int r = 0; r < R; r++) c[r] = CHECK_ROW[r][j-R];
    end
    return c;
  endfunction

endpackage
