// kalman_t_tb -- M3 transparency layer: core outputs in normal mode, the
// 16-bit input copied to both outputs in transparent mode.
module kalman_t_tb;
  logic [15:0] k_in, core_qz, core_qa, q_z, q_a;
  logic [14:0] core_in;
  logic        t;
  int checks = 0, failures = 0;

  kalman_t dut (.k_in(k_in), .t(t), .core_in(core_in), .core_qz(core_qz),
                .core_qa(core_qa), .q_z(q_z), .q_a(q_a));

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
      k_in = 16'($urandom); core_qz = 16'($urandom); core_qa = 16'($urandom);
      t = 1'b0; #1;
      check(core_in == k_in[14:0], "core_in");
      check(q_z == core_qz, "normal q_z");
      check(q_a == core_qa, "normal q_a");
      t = 1'b1; #1;
      check(q_z == k_in, "transparent q_z");
      check(q_a == k_in, "transparent q_a");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
