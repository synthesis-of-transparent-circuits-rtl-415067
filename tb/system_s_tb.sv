// system_s_tb -- end-to-end test of the transparent example system at its
// default sizes.
//
// The testbench plays the two external benchmark cores (Barcode, Kalman) by
// driving their output ports with random words, and keeps an independent
// reference model of the Am2910 sequencer in step whenever M4 is in normal
// mode.  It then runs:
//   * normal operation: X1*X2 feeds the GCD, whose result must appear on Z1
//     and, truncated to 6 bits, at the Barcode core; the loop bus must be
//     closed (Am2910 output bits 4:0 back at the Barcode core); Kalman and
//     Am2910 are fed from the core outputs and Z2 must follow the model;
//   * one test session per module M0..M4, each applying test data from the
//     chip inputs X1/X2/TI through the transparent modules and checking the
//     response of the module under test on Z1/Z2/Z2X in the same cycle (M1
//     and M4, which are sequential, over several clocks);
//   * the interconnect test with every module transparent;
//   * the Z1 mux with both selects, and the example module M in both modes.
// Each of these mechanisms is counted and a failure is counted for any that
// never happened.
module system_s_tb;
  import am2910_model_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [15:0] x1 = '0, x2 = '0;
  logic        z1_sel = 1'b0;
  logic [2:0]  tsel = 3'd7;
  logic [4:0]  ti = '0;
  logic [15:0] z1, z2;
  logic [4:0]  z2x;
  logic        gcd_done;
  logic [5:0]  m2_core_a;
  logic [4:0]  m2_core_b;
  logic [17:0] m2_core_q = '0;
  logic [14:0] m3_core_in;
  logic [15:0] m3_core_qz = '0, m3_core_qa = '0;
  logic [3:0]  m_x = '0;
  logic        m_t = 1'b0;
  logic [1:0]  m_z, m_y;

  system_s dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_normal = 0, n_sess [5] = '{0, 0, 0, 0, 0}, n_interconnect = 0;
  int n_loop_closed = 0, n_loop_broken = 0, n_sel0 = 0, n_sel1 = 0;
  int n_gcd_normal = 0, n_gcd_test = 0, n_m_normal = 0, n_m_transp = 0;

  am2910_model m4 = new();

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

  // A random Am2910 input word: {I, D} and {CC_n, CCEN_n, CI, RLD_n, OE_n}.
  function automatic logic [20:0] am_word();
    logic [3:0]  i = 4'($urandom_range(1, 15));
    logic [11:0] d = 12'($urandom);
    if (i inside {4'd4, 4'd12}) d = 12'($urandom_range(0, 4));
    return {1'($urandom), 1'($urandom_range(0, 3) == 0), 1'b1,
            1'($urandom_range(0, 15) != 0), 1'b0, i, d};
  endfunction

  // Compare Z2 with the model for the Am2910 inputs now applied, then step.
  task automatic check_am(logic [15:0] di, logic [4:0] c, string where);
    logic [15:0] e;
    e = m4.step(di[15:12], di[11:0], c[4], c[3], c[2], c[1], c[0]);
    check(z2 == e, $sformatf("%s: Am2910 output %h expected %h", where, z2, e));
    check(z2x == 5'b0, {where, ": Z2X zero with Am2910 in normal mode"});
  endtask

  task automatic tick();
    @(posedge clk); #1;
  endtask

  // ---------------------------------------------------------------- normal
  // Keeps the GCD busy on X1*X2 and checks every completed result.
  task automatic normal_run(int cycles);
    logic [31:0] prod;
    int unsigned g, k;
    logic [20:0] w;
    bit          first = 1'b1;
    tsel = 3'd7;
    for (int c = 0; c < cycles; c++) begin
      w = am_word();
      m2_core_q  = {w[20:16], 13'($urandom)};   // core drives the Am2910 control bits
      m3_core_qa = w[15:0];
      m3_core_qz = 16'($urandom);
      z1_sel     = 1'($urandom);
      #1;
      prod = x1 * x2;
      check(m2_core_b == z2[4:0], "normal: loop bus closed (Z2[4:0] back to Barcode)");
      n_loop_closed++;
      check(m3_core_in == m2_core_q[14:0], "normal: Barcode -> Kalman");
      if (z1_sel) begin
        check(z1 == m3_core_qz, "normal: Z1 mux sel 1"); n_sel1++;
      end else n_sel0++;
      check_am(m3_core_qa, m2_core_q[17:13], "normal");
      // The first result after X1/X2 changed may still be for the old
      // operands, so it is not checked.
      if (gcd_done && first) first = 1'b0;
      else if (gcd_done) begin
        euclid(32'(prod[31:16]), 32'(prod[15:0]), g, k);
        if (!z1_sel) check(z1 == 16'(g), "normal: GCD of product on Z1");
        check(m2_core_a == 6'(g), "normal: truncated GCD at Barcode");
        n_gcd_normal++;
      end
      n_normal++;
      tick();
    end
  endtask

  // ---------------------------------------------------------------- M0
  task automatic session_m0(int n);
    logic [31:0] prod;
    tsel = 3'd0;
    for (int c = 0; c < n; c++) begin
      x1 = 16'($urandom); x2 = 16'($urandom); ti = 5'($urandom);
      z1_sel = 1'b0; #1;
      prod = 32'(x1) * 32'(x2);
      check(z1 == prod[31:16], "M0 session: product high half on Z1");
      check(z2 == prod[15:0], "M0 session: product low half on Z2");
      check(z2x == ti, "M0 session: TI on Z2X");
      check(m2_core_b == ti, "M0 session: loop bus from TI");
      n_loop_broken++;
      n_sess[0]++;
      tick();
    end
  endtask

  // ---------------------------------------------------------------- M1
  task automatic session_m1(int n);
    int unsigned g, k, cnt;
    tsel = 3'd1; z1_sel = 1'b0;
    // finish whatever the GCD was doing before the session
    cnt = 0;
    while (!gcd_done && cnt < 70000) begin tick(); cnt++; end
    for (int c = 0; c < n; c++) begin
      x1 = 16'($urandom_range(1, 3000)); x2 = 16'($urandom_range(1, 3000));
      ti = 5'($urandom);
      euclid(32'(x1), 32'(x2), g, k);
      cnt = 0;
      do begin tick(); cnt++; end while (!gcd_done && cnt < 70000);
      check(gcd_done, "M1 session: done");
      check(cnt == k + 2, $sformatf("M1 session: latency %0d expected %0d", cnt, k + 2));
      check(z1 == 16'(g), "M1 session: GCD on Z1");
      check(z2 == 16'(6'(g)), "M1 session: truncated GCD on Z2 through M2..M4");
      check(z2x == ti, "M1 session: TI on Z2X");
      n_gcd_test++;
      n_sess[1]++;
    end
  endtask

  // ---------------------------------------------------------------- M2
  task automatic session_m2(int n);
    tsel = 3'd2;
    for (int c = 0; c < n; c++) begin
      x1 = 16'($urandom); x2 = 16'($urandom); ti = 5'($urandom);
      m2_core_q = 18'($urandom);
      z1_sel = 1'b1; #1;
      check(m2_core_a == x2[5:0], "M2 session: core input A from X2");
      check(m2_core_b == ti, "M2 session: core input B from TI");
      n_loop_broken++;
      check(z2x == m2_core_q[17:13], "M2 session: core bits 17:13 on Z2X");
      check(z2 == {1'b0, m2_core_q[14:0]}, "M2 session: core bits 14:0 on Z2");
      check(z1 == {1'b0, m2_core_q[14:0]}, "M2 session: core bits 14:0 on Z1");
      n_sel1++;
      n_sess[2]++;
      tick();
    end
  endtask

  // ---------------------------------------------------------------- M3
  task automatic session_m3(int n);
    tsel = 3'd3;
    for (int c = 0; c < n; c++) begin
      x1 = 16'($urandom); x2 = 16'($urandom); ti = 5'($urandom);
      m3_core_qz = 16'($urandom); m3_core_qa = 16'($urandom);
      z1_sel = 1'b1; #1;
      check(m3_core_in == x2[14:0], "M3 session: core input from X2");
      check(z1 == m3_core_qz, "M3 session: first core output on Z1");
      check(z2 == m3_core_qa, "M3 session: second core output on Z2");
      check(z2x == ti, "M3 session: TI on Z2X");
      n_sess[3]++;
      tick();
    end
  endtask

  // ---------------------------------------------------------------- M4
  task automatic session_m4(int n);
    logic [20:0] w;
    tsel = 3'd4;
    for (int c = 0; c < n; c++) begin
      w  = am_word();
      x1 = 16'($urandom); x2 = w[15:0]; ti = w[20:16];
      z1_sel = 1'b0; #1;
      check(z1 == x1, "M4 session: X1 on Z1 through transparent GCD");
      check_am(x2, ti, "M4 session");
      n_loop_broken++;
      n_sess[4]++;
      tick();
    end
  endtask

  // ---------------------------------------------------------------- all transparent
  task automatic interconnect_test(int n);
    tsel = 3'd5;
    for (int c = 0; c < n; c++) begin
      x1 = 16'($urandom); x2 = 16'($urandom); ti = 5'($urandom);
      z1_sel = 1'b0; #1;
      check(z1 == x1, "interconnect: X1 -> Z1");
      check(z2 == x2, "interconnect: X2 -> Z2");
      check(z2x == ti, "interconnect: TI -> Z2X");
      z1_sel = 1'b1; #1;
      check(z1 == x2, "interconnect: X2 -> Z1 through Kalman path");
      n_sel0++; n_sel1++;
      n_interconnect++;
      tick();
    end
  endtask

  // ---------------------------------------------------------------- module M
  task automatic example_m();
    int unsigned grp [16] = '{1, 0, 1, 0, 3, 1, 2, 1, 3, 2, 3, 2, 0, 3, 0, 2};
    for (int v = 0; v < 16; v++) begin
      m_x = 4'(v);
      m_t = 1'b0; #1;
      check(m_z == 2'(grp[v]) && m_y == 2'b00, "example M: normal mode");
      n_m_normal++;
      m_t = 1'b1; #1;
      check({m_z, m_y} == m_x, "example M: transparent mode");
      n_m_transp++;
    end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x1 = 16'd96; x2 = 16'd45;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    m4.reset();
    example_m();
    for (int round = 0; round < 4; round++) begin
      // operands whose product has two non-zero halves with a short GCD run
      begin
        int unsigned g, k;
        logic [31:0] p;
        do begin
          x1 = 16'($urandom_range(300, 65535)); x2 = 16'($urandom_range(300, 65535));
          p = 32'(x1) * 32'(x2);
          euclid(32'(p[31:16]), 32'(p[15:0]), g, k);
        end while (p[31:16] == 0 || p[15:0] == 0 || k > 100);
      end
      normal_run(400);
      session_m0(50);
      session_m1(20);
      session_m2(50);
      session_m3(50);
      session_m4(200);
      interconnect_test(50);
    end
    check(n_normal > 0, "normal operation happened");
    check(n_gcd_normal > 0, "GCD completed in normal operation");
    check(n_gcd_test > 0, "GCD completed in its test session");
    for (int i = 0; i < 5; i++) check(n_sess[i] > 0, $sformatf("session M%0d happened", i));
    check(n_interconnect > 0, "interconnect test happened");
    check(n_loop_closed > 0, "feedback loop closed");
    check(n_loop_broken > 0, "feedback loop broken and driven from TI");
    check(n_sel0 > 0 && n_sel1 > 0, "Z1 mux used with both selects");
    check(n_m_normal > 0 && n_m_transp > 0, "example M in both modes");
    $display("normal %0d cycles (%0d GCD results), sessions M0..M4 %0d/%0d/%0d/%0d/%0d, interconnect %0d",
             n_normal, n_gcd_normal, n_sess[0], n_sess[1], n_sess[2], n_sess[3], n_sess[4], n_interconnect);
    $display("loop closed %0d, loop broken %0d, Z1 sel0 %0d sel1 %0d",
             n_loop_closed, n_loop_broken, n_sel0, n_sel1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
