// barcode_t_tb -- M2 transparency layer: core input wiring, the loop
// multiplexer (loop bus or test pins), the normal-mode output split (shared
// bits 14:13) and the 21-bit transparent pass-through.
module barcode_t_tb;
  logic [15:0] b_in;
  logic [4:0]  fb_in, ti, core_b;
  logic        t, loop_open;
  logic [5:0]  core_a;
  logic [17:0] core_q;
  logic [20:0] q;
  int checks = 0, failures = 0;

  barcode_t dut (.b_in(b_in), .fb_in(fb_in), .ti(ti), .loop_open(loop_open),
                 .t(t), .core_a(core_a), .core_b(core_b), .core_q(core_q), .q(q));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      b_in = 16'($urandom); fb_in = 5'($urandom); ti = 5'($urandom);
      if (ti == fb_in) ti = ~fb_in;
      core_q = 18'($urandom);
      // normal operation: loop closed, core drives the outputs
      t = 1'b0; loop_open = 1'b0; #1;
      check(core_a == b_in[5:0], "core_a");
      check(core_b == fb_in, "core_b from loop bus");
      check(q[20:16] == core_q[17:13], "normal to-Am2910 bits");
      check(q[15:0] == 16'(core_q[14:0]), "normal to-Kalman bits");
      // M2 under test: loop open, core still drives the outputs
      loop_open = 1'b1; #1;
      check(core_b == ti, "core_b from test pins");
      check(q[20:16] == core_q[17:13], "session to-Am2910 bits");
      // M2 transparent
      t = 1'b1; #1;
      check(q[15:0] == b_in, "transparent low 16");
      check(q[20:16] == ti, "transparent high 5");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
