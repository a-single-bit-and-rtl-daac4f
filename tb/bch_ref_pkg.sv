// bch_ref_pkg: reference model used by the testbenches.
//
// Built independently of the RTL's check-sum table: message bit i sits at
// position HPOS[i] of a 21-bit Hamming layout (positions 1..21 that are not
// powers of two), parity bit k < 5 covers the message bits whose position
// has bit k set, and parity bit 5 is the XOR of all message bits. Decoding
// is done by brute force: a word is clean if it re-encodes to itself,
// correctable if exactly one single-bit flip makes it clean, otherwise
// uncorrectable. Code word layout: {message[15:0], parity[5:0]}.
package bch_ref_pkg;

  localparam int HPOS [16] = '{3, 5, 6, 7, 9, 10, 11, 12, 13, 14, 15,
                               17, 18, 19, 20, 21};

  function automatic logic [5:0] ref_parity(input logic [15:0] m);
    logic [5:0] p;
    p = '0;
    for (int i = 0; i < 16; i++) begin
      if (m[i]) begin
        for (int k = 0; k < 5; k++) if ((HPOS[i] >> k) & 1) p[k] = ~p[k];
        p[5] = ~p[5];
      end
    end
    return p;
  endfunction

  function automatic logic [21:0] ref_encode(input logic [15:0] m);
    return {m, ref_parity(m)};
  endfunction

  function automatic bit ref_is_codeword(input logic [21:0] w);
    return ref_parity(w[21:6]) == w[5:0];
  endfunction

  // Syndrome a single error on code word bit j produces.
  function automatic logic [5:0] ref_col(input int j);
    if (j < 6) return 6'(1 << j);
    return {1'b1, 5'(HPOS[j-6])};
  endfunction

  // status: 0 clean, 1 corrected, 2 uncorrectable. loc valid when status 1.
  function automatic void ref_decode(input logic [21:0] w,
                                     output logic [15:0] msg,
                                     output int status, output int loc);
    int hits;
    msg = w[21:6]; status = 0; loc = 0; hits = 0;
    if (ref_is_codeword(w)) return;
    for (int j = 0; j < 22; j++) begin
      logic [21:0] t;
      t = w ^ (22'(1) << j);
      if (ref_is_codeword(t)) begin
        hits++; loc = j; msg = t[21:6];
      end
    end
    if (hits == 1) status = 1;
    else begin status = 2; msg = w[21:6]; loc = 0; end
  endfunction

  // Random mask with exactly n distinct bits set among 22.
  function automatic logic [21:0] rand_mask(input int n);
    logic [21:0] m;
    m = '0;
    while ($countones(m) < n) m[$urandom_range(21, 0)] = 1'b1;
    return m;
  endfunction

endpackage
