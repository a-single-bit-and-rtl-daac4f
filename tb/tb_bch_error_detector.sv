// tb_bch_error_detector: all 64 syndromes combined with a zero error
// pattern and with a one-hot error pattern; checks the status and the error
// flag against the classification rule (zero syndrome: clean; pattern
// present: corrected; otherwise: uncorrectable).
module tb_bch_error_detector;
  import bch_pkg::*;

  syndrome_t syndrome;
  codeword_t err_pattern;
  logic      err_detected;
  status_e   status;
  int checks = 0, failures = 0;

  bch_error_detector dut (.syndrome(syndrome), .err_pattern(err_pattern),
                          .err_detected(err_detected), .status(status));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: syn=%b pat=%b st=%0d", what, syndrome, err_pattern, status);
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
    for (int s = 0; s < 64; s++) begin
      for (int p = 0; p < 2; p++) begin
        syndrome    = 6'(s);
        err_pattern = p ? (22'(1) << $urandom_range(21, 0)) : '0;
        #1;
        check(err_detected == (s != 0), "flag");
        if (s == 0)      check(status == ST_NO_ERROR, "clean");
        else if (p == 1) check(status == ST_CORRECTED, "corrected");
        else             check(status == ST_UNCORRECTABLE, "uncorrectable");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
