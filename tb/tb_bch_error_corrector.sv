// tb_bch_error_corrector: every one of the 64 syndromes is applied with
// random received words. When the syndrome equals the reference column of
// bit j, the error pattern must be one-hot at j, the location j, and the
// corrected word the received word with bit j flipped; for every other
// syndrome the pattern must be zero and the word must pass unchanged.
module tb_bch_error_corrector;
  import bch_pkg::*;
  import bch_ref_pkg::*;

  codeword_t rx_word, err_pattern, corrected;
  syndrome_t syndrome;
  location_t err_loc;
  logic      loc_valid;
  int checks = 0, failures = 0;

  bch_error_corrector dut (
    .rx_word(rx_word), .syndrome(syndrome), .err_pattern(err_pattern),
    .corrected(corrected), .err_loc(err_loc), .loc_valid(loc_valid));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: syn=%b pat=%b loc=%0d v=%b", what, syndrome, err_pattern, err_loc, loc_valid);
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
    int hit, n_single = 0;
    for (int rep = 0; rep < 20; rep++) begin
      for (int s = 0; s < 64; s++) begin
        rx_word  = 22'($urandom);
        syndrome = 6'(s);
        hit = -1;
        for (int j = 0; j < 22; j++) if (ref_col(j) == 6'(s)) hit = j;
        #1;
        if (hit >= 0) begin
          n_single++;
          check(err_pattern == (22'(1) << hit), "pattern one-hot");
          check(loc_valid && err_loc == 5'(hit), "location");
          check(corrected == (rx_word ^ (22'(1) << hit)), "corrected");
        end else begin
          check(err_pattern == '0 && !loc_valid, "no pattern");
          check(corrected == rx_word, "unchanged");
        end
      end
    end
    check(n_single == 20 * 22, "22 correctable syndromes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
