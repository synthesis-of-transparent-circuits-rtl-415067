// gcd_t_tb -- M1 GCD unit.  Each operand pair is presented right after the
// previous result; the result is compared with a modulo-based Euclid
// reference, and the number of clock edges to done with k + 2, where k, the
// number of subtraction steps, is the sum of the Euclid quotients less one.
// Transparent mode is checked for the same-cycle pass-through, for done
// staying low and for the computation being frozen while t = 1.
module gcd_t_tb;
  logic        clk = 1'b0, rst_n = 1'b0, t = 1'b0;
  logic [31:0] din = '0;
  logic [31:0] q;
  logic        done;
  int checks = 0, failures = 0;

  gcd_t dut (.clk(clk), .rst_n(rst_n), .t(t), .din(din), .q(q), .done(done));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic void euclid(int unsigned a, int unsigned b,
                                 output int unsigned g, output int unsigned k);
    int unsigned s = 0;
    if (a == 0 || b == 0) begin g = a | b; k = 0; return; end
    while (b != 0) begin
      s += a / b;
      {a, b} = {b, a % b};
    end
    g = a; k = s - 1;
  endfunction

  // Present (a, b) just after an edge at which the unit restarted, then
  // optionally freeze it for 'hold' cycles in transparent mode.  Frozen
  // cycles are not counted, so the count must still be k + 2.
  task automatic run(logic [15:0] a, logic [15:0] b, int hold);
    int unsigned g, k, n;
    logic [31:0] pass;
    euclid(32'(a), 32'(b), g, k);
    din = {a, b};
    n = 0;
    do begin
      @(posedge clk); n++;
      if (hold > 0 && n == 2) begin
        #1 t = 1'b1;
        for (int h = 0; h < hold; h++) begin
          pass = $urandom;
          din = pass; #1;
          check(q == pass, "transparent pass-through");
          @(posedge clk); #1;
          check(!done, "done low in transparent mode");
        end
        din = {a, b};
        t = 1'b0;
      end
      #1;
    end while (!done && n < 70000 + hold);
    check(done, "done seen");
    check(n == k + 2, $sformatf("latency %0d for k=%0d hold=%0d", n, k, hold));
    check(q[31:16] == 16'(g), $sformatf("gcd(%0d,%0d)=%0d got %0d", a, b, g, q[31:16]));
    check(q[15:0] == {10'b0, 6'(g)}, "truncated copy");
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = {16'd48, 16'd18};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    run(16'd48, 16'd18, 0);
    run(16'd7, 16'd7, 0);
    run(16'd0, 16'd25, 0);
    run(16'd40, 16'd0, 0);
    run(16'd0, 16'd0, 0);
    run(16'hffff, 16'd1, 0);
    run(16'd1071, 16'd462, 3);
    for (int i = 0; i < 300; i++)
      run(16'($urandom_range(1, 4000)), 16'($urandom_range(1, 4000)), (i % 5 == 0) ? 2 : 0);
    for (int i = 0; i < 30; i++)
      run(16'($urandom), 16'($urandom), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
