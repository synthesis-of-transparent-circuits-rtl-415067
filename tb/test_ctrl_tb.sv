// test_ctrl_tb -- session decoder: every select code against a table of the
// expected transparency vector and test-mode flag.
module test_ctrl_tb;
  logic [2:0] sel;
  logic [4:0] t;
  logic       test_mode;
  int checks = 0, failures = 0;

  test_ctrl dut (.sel(sel), .t(t), .test_mode(test_mode));

  // expected t per code: sessions 0..4 clear one bit, 5 = all transparent,
  // 6 and 7 = normal operation.
  logic [4:0] exp_t  [8] = '{5'b11110, 5'b11101, 5'b11011, 5'b10111, 5'b01111,
                             5'b11111, 5'b00000, 5'b00000};
  logic       exp_tm [8] = '{1, 1, 1, 1, 1, 1, 0, 0};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++) begin
      sel = 3'(c); #1;
      checks++;
      if (t !== exp_t[c]) begin failures++; $display("FAIL code %0d t=%b", c, t); end
      checks++;
      if (test_mode !== exp_tm[c]) begin failures++; $display("FAIL code %0d test_mode", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
