// tb_bch_parallel_decoder: end-to-end checks of the combinational decoder.
//  - the published examples: the code word of message 1111111111111000 is
//    decoded clean, and the received message 1111111111110000 with the same
//    parity bits (message bit 3 flipped, code word bit 9) is corrected back
//    to 1111111111111000 with its location reported;
//  - every single-bit error on random messages is corrected and located;
//  - random 2, 3 and 4 bit errors are decoded exactly as the brute-force
//    reference decoder decodes them (detected, or miscorrected where the
//    code cannot tell them from a single error).
module tb_bch_parallel_decoder;
  import bch_pkg::*;
  import bch_ref_pkg::*;

  codeword_t rx_word, corrected;
  message_t  dec_message;
  syndrome_t syndrome;
  location_t err_loc;
  logic      loc_valid, err_detected;
  status_e   status;
  int checks = 0, failures = 0;
  int n_clean = 0, n_corr = 0, n_unc = 0;

  bch_parallel_decoder dut (
    .rx_word(rx_word), .dec_message(dec_message), .corrected(corrected),
    .syndrome(syndrome), .err_loc(err_loc), .loc_valid(loc_valid),
    .err_detected(err_detected), .status(status));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: v=%b msg=%h st=%0d loc=%0d", what, rx_word, dec_message, status, err_loc);
    end
  endtask

  task automatic check_ref();
    logic [15:0] m; int st, loc;
    ref_decode(rx_word, m, st, loc);
    check(dec_message == m, "message");
    check(int'(status) == st, "status");
    check(err_detected == (st != 0), "error flag");
    if (st == 1) check(loc_valid && int'(err_loc) == loc, "location");
    else         check(!loc_valid, "no location");
    case (st) 0: n_clean++; 1: n_corr++; default: n_unc++; endcase
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [21:0] cw;
    // published examples
    rx_word = 22'b1111111111111000111110;
    #1;
    check(status == ST_NO_ERROR && dec_message == 16'hFFF8 && syndrome == '0, "example clean");
    rx_word = 22'b1111111111110000111110;
    #1;
    check(status == ST_CORRECTED && dec_message == 16'b1111111111111000, "example corrected");
    check(loc_valid && err_loc == 5'd9, "example location");
    // all single errors
    for (int t = 0; t < 100; t++) begin
      cw = ref_encode(16'($urandom));
      for (int j = 0; j < 22; j++) begin
        rx_word = cw ^ (22'(1) << j);
        #1;
        check(status == ST_CORRECTED && dec_message == cw[21:6] &&
              corrected == cw && err_loc == 5'(j), "single");
      end
    end
    // multi-bit errors
    for (int t = 0; t < 3000; t++) begin
      cw = ref_encode(16'($urandom));
      rx_word = cw ^ rand_mask(2 + t % 3);
      #1 check_ref();
    end
    $display("multi-bit: %0d detected, %0d taken for single errors, %0d clean", n_unc, n_corr, n_clean);
    check(n_unc > 0, "some multi-bit errors detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
