// tb_bch_shift_reg: parallel load then 22 shifts out (MSB first) compared
// with the loaded word, a word shifted in serially compared in parallel,
// hold when neither load nor shift, load priority over shift, and reset.
module tb_bch_shift_reg;
  localparam int W = 22;
  logic clk = 0, rst_n = 0, load = 0, shift = 0, serial_in = 0, serial_out;
  logic [W-1:0] load_data = '0, q;
  int checks = 0, failures = 0;
  int cycles = 0;

  bch_shift_reg dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: q=%b", what, q);
    end
  endtask

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] word, got;
    @(negedge clk); @(negedge clk);
    check(q == '0, "reset");
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      word = W'($urandom);
      load = 1; load_data = word; shift = 1;   // load wins over shift
      @(negedge clk);
      load = 0; shift = 0;
      check(q == word, "load");
      @(negedge clk);
      check(q == word, "hold");
      got = '0;
      shift = 1;
      for (int i = 0; i < W; i++) begin
        got = {got[W-2:0], serial_out};
        serial_in = word[W-1-i];             // shift the same word back in
        @(negedge clk);
      end
      shift = 0;
      check(got == word, "serial out MSB first");
      check(q == word, "serial in");
    end
    rst_n = 0;
    @(negedge clk);
    check(q == '0, "reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
