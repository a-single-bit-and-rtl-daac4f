// tb_bch_encoder: checks the encoder against the published example
// (message 1111111111111000 -> parity 111110, code word
// 1111111111111000111110) and against the reference model for all 65536
// messages. Combinational block: inputs change every 1 ns.
module tb_bch_encoder;
  import bch_pkg::*;
  import bch_ref_pkg::*;

  message_t  message;
  parity_t   parity;
  codeword_t codeword;
  int checks = 0, failures = 0;

  bch_encoder dut (.message(message), .parity(parity), .codeword(codeword));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: msg=%h par=%b cw=%b", what, message, parity, codeword);
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
    message = 16'b1111111111111000;
    #1;
    check(parity == 6'b111110, "example parity");
    check(codeword == 22'b1111111111111000111110, "example code word");
    for (int m = 0; m < 65536; m++) begin
      message = 16'(m);
      #1;
      check(parity == ref_parity(message), "parity");
      check(codeword == ref_encode(message), "code word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
