// transparent_m_tb -- exhaustive check of the example module M in both modes.
// Normal mode: z must equal the group of x taken from four lists of codes;
// y must be zero.  Transparent mode: {z, y} must equal x.
module transparent_m_tb;
  logic [3:0] x;
  logic       t;
  logic [1:0] z, y;
  int checks = 0, failures = 0;

  transparent_m dut (.x(x), .t(t), .z(z), .y(y));

  int unsigned groups [4][4] = '{'{1, 3, 12, 14}, '{0, 2, 5, 7},
                                 '{6, 9, 11, 15}, '{4, 8, 10, 13}};

  function automatic int expected_group(int v);
    for (int g = 0; g < 4; g++)
      for (int k = 0; k < 4; k++)
        if (groups[g][k] == v) return g;
    return -1;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (x=%0d t=%0b z=%0d y=%0d)", what, x, t, z, y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      x = 4'(v); t = 1'b0; #1;
      check(int'(z) == expected_group(v), "normal z");
      check(y == 2'b00, "normal y");
      t = 1'b1; #1;
      check({z, y} == x, "transparent pass-through");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
