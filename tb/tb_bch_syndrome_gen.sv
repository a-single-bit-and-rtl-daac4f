// tb_bch_syndrome_gen: valid code words (from the reference encoder) with
// 0 to 4 random bit flips. By linearity the expected syndrome is the XOR of
// the reference parity-check columns of the flipped bits; every single-bit
// flip on every position is also checked directly.
module tb_bch_syndrome_gen;
  import bch_pkg::*;
  import bch_ref_pkg::*;

  codeword_t rx_word;
  syndrome_t syndrome;
  int checks = 0, failures = 0;

  bch_syndrome_gen dut (.rx_word(rx_word), .syndrome(syndrome));

  task automatic check(input logic [5:0] exp, input string what);
    checks++;
    if (syndrome !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: word=%b syn=%b exp=%b", what, rx_word, syndrome, exp);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [21:0] cw, mask;
    logic [5:0]  exp;
    // clean words give zero syndrome
    for (int t = 0; t < 200; t++) begin
      rx_word = ref_encode(16'($urandom));
      #1 check('0, "clean");
    end
    // every single flip of the example word
    cw = ref_encode(16'hFFF8);
    for (int j = 0; j < 22; j++) begin
      rx_word = cw ^ (22'(1) << j);
      #1 check(ref_col(j), "single");
    end
    // random multi-bit flips
    for (int t = 0; t < 4000; t++) begin
      cw   = ref_encode(16'($urandom));
      mask = rand_mask(1 + t % 4);
      exp  = '0;
      for (int j = 0; j < 22; j++) if (mask[j]) exp ^= ref_col(j);
      rx_word = cw ^ mask;
      #1 check(exp, "multi");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
