// mult_t_tb -- M0 multiplier: product in normal mode, operand concatenation
// in transparent mode, over corner and random operands.
module mult_t_tb;
  logic [15:0] a, b;
  logic        t;
  logic [31:0] p;
  int checks = 0, failures = 0;

  mult_t dut (.a(a), .b(b), .t(t), .p(p));

  task automatic apply(logic [15:0] va, logic [15:0] vb);
    longint unsigned prod;
    a = va; b = vb;
    prod = longint'(va) * longint'(vb);
    t = 1'b0; #1;
    checks++;
    if (p != 32'(prod)) begin failures++; $display("FAIL mul %h*%h=%h", va, vb, p); end
    t = 1'b1; #1;
    checks++;
    if (p != {va, vb}) begin failures++; $display("FAIL pass %h %h -> %h", va, vb, p); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(16'h0000, 16'h0000);
    apply(16'hffff, 16'hffff);
    apply(16'h0001, 16'hffff);
    apply(16'h8000, 16'h8000);
    apply(16'h1234, 16'h0000);
    for (int i = 0; i < 2000; i++) apply(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
