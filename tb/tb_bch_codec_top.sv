// tb_bch_codec_top: end-to-end test of the complete link at its default
// size. Each transaction presents a 16-bit message, flips a chosen set of
// code word bits on the serial line through chan_flip while the word is
// being shifted, and checks the registered result against the brute-force
// reference decoder: decoded message, status, syndrome, error location and
// the received word. It also checks the timing: the line carries code word
// bit 22-k in the k-th shift cycle, out_valid rises exactly 24 cycles after
// the accepting edge's cycle (23 edges of latency) and is a one-cycle pulse.
//
// Mechanisms counted, each of which must occur: clean transfer, single
// error on a message bit corrected, single error on a parity bit corrected,
// uncorrectable error detected, input held off while the link is busy
// (in_valid high, in_ready low), back-to-back words, idle gaps.
// The first transaction is the published example: message
// 1111111111111000 with message bit 3 flipped is received as
// 1111111111110000 and corrected.
module tb_bch_codec_top;
  import bch_pkg::*;
  import bch_ref_pkg::*;

  localparam int NT = 600;

  logic      clk = 0, rst_n = 0;
  logic      in_valid = 0, in_ready;
  message_t  in_message = '0;
  logic      chan_flip = 0, shift_active, line_bit;
  logic      out_valid, out_loc_valid;
  message_t  out_message;
  codeword_t out_rx_word;
  syndrome_t out_syndrome;
  status_e   out_status;
  location_t out_err_loc;

  int checks = 0, failures = 0, cyc = 0;
  int n_clean = 0, n_data = 0, n_par = 0, n_unc = 0, n_stall = 0, n_b2b = 0, n_gap = 0;

  bch_codec_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  task automatic report();
    $display("clean=%0d data_corr=%0d parity_corr=%0d uncorrectable=%0d stall_cycles=%0d back_to_back=%0d gaps=%0d",
             n_clean, n_data, n_par, n_unc, n_stall, n_b2b, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    wait (cyc == 40 * NT + 1000);
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  initial begin
    logic [15:0] m, exp_m;
    logic [21:0] cw, mask, rxw;
    int st, loc, kind;
    bit prev_done, gap;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(in_ready && !out_valid, "idle after reset");
    prev_done = 0;
    for (int t = 0; t < NT; t++) begin
      // choose message and channel errors
      kind = t % 6;
      m = 16'($urandom);
      case (kind)
        0: mask = '0;
        1: mask = 22'(1) << $urandom_range(21, 6);
        2: mask = 22'(1) << $urandom_range(5, 0);
        default: mask = rand_mask(kind - 1);
      endcase
      if (t == 0) begin m = 16'hFFF8; mask = 22'(1) << 9; end
      cw = ref_encode(m);
      rxw = cw ^ mask;
      // optional idle gap
      gap = (t % 5 == 4);
      if (gap) begin
        in_valid = 0;
        repeat ($urandom_range(3, 1)) @(negedge clk);
        n_gap++;
      end
      in_valid = 1;
      in_message = m;
      #1;
      if (prev_done && !gap && in_ready) n_b2b++;
      check(in_ready, "ready when idle");
      // accepted at the next edge; cycle k below is the k-th after it
      for (int k = 1; k <= 22; k++) begin
        @(negedge clk);
        // keep requesting during the transfer in half the transactions
        in_valid = (t % 2 == 1);
        in_message = 16'($urandom);
        chan_flip = mask[22 - k];
        #1;
        if (in_valid && !in_ready) n_stall++;
        check(shift_active && !in_ready && !out_valid, "shifting");
        check(line_bit == rxw[22 - k], "line bit order");
      end
      @(negedge clk);
      chan_flip = 0;
      in_valid = 0;
      check(!shift_active && !out_valid && !in_ready, "decode cycle");
      @(negedge clk);
      check(out_valid, "out_valid 24 cycles after acceptance");
      ref_decode(rxw, exp_m, st, loc);
      check(out_rx_word == rxw, "received word");
      check(out_message == exp_m, "decoded message");
      check(int'(out_status) == st, "status");
      check(out_syndrome == (ref_parity(rxw[21:6]) ^ rxw[5:0]), "syndrome");
      if (st == 1) check(out_loc_valid && int'(out_err_loc) == loc, "location");
      else         check(!out_loc_valid, "no location");
      if (t == 0) check(out_message == 16'hFFF8 && out_status == ST_CORRECTED &&
                        out_err_loc == 5'd9, "published example");
      if (mask == '0) check(st == 0 && out_message == m, "clean word intact");
      if ($countones(mask) == 1) check(st == 1 && out_message == m, "single error fixed");
      case (st)
        0: n_clean++;
        1: if (loc >= 6) n_data++; else n_par++;
        default: n_unc++;
      endcase
      // out_valid must drop again: checked in the next transaction's
      // first shift cycle, or below after the last one
      prev_done = 1;
    end
    @(negedge clk);
    check(!out_valid, "out_valid one-cycle pulse");
    check(n_clean > 0, "clean transfer seen");
    check(n_data > 0, "message-bit correction seen");
    check(n_par > 0, "parity-bit correction seen");
    check(n_unc > 0, "uncorrectable detection seen");
    check(n_stall > 0, "input hold-off seen");
    check(n_b2b > 0, "back-to-back words seen");
    check(n_gap > 0, "idle gaps seen");
    report();
    $finish;
  end
endmodule
