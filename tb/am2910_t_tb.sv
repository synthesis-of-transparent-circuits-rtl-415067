// am2910_t_tb -- M4 sequencer against an independent reference model.
// A random instruction stream (pushes favoured so that the stack fills, JZ
// rare so that it is seldom cleared) is applied one instruction per clock;
// before each edge the 16 normal outputs are compared with the model and the
// five extra outputs must be zero.  Every few cycles the unit is switched to
// transparent mode for a cycle: the outputs must equal {ctl, d_in} and the
// state must not move (the model is not stepped).  The test also counts that
// every instruction, a full stack, a counter reload and OE_n were exercised.
module am2910_t_tb;
  import am2910_model_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, t = 1'b0;
  logic [15:0] d_in = '0;
  logic [4:0]  ctl = 5'b01001;   // CC_n=0 CCEN_n=1 CI=0 RLD_n=0 OE_n=1
  logic [20:0] q;
  int checks = 0, failures = 0;
  int seen_instr [16];
  int seen_full = 0, seen_rld = 0, seen_oe = 0, seen_transp = 0;

  am2910_t dut (.clk(clk), .rst_n(rst_n), .t(t), .d_in(d_in), .ctl(ctl), .q(q));

  always #5 clk = ~clk;

  am2910_model m = new();

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [3:0] pick_instr();
    int r = $urandom_range(0, 99);
    if (r < 2)  return 4'd0;                       // JZ
    if (r < 22) return 4'($urandom_range(1, 5) == 1 ? 1 : ($urandom_range(0,1) ? 4 : 5)); // pushes
    return 4'($urandom_range(1, 15));
  endfunction

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0]  i;
    logic [11:0] d;
    logic        cc_n, ccen_n, ci, rld_n, oe_n;
    logic [15:0] exp;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    m.reset();
    for (int cyc = 0; cyc < 20000; cyc++) begin
      if (cyc % 7 == 3) begin
        // transparent cycle: pass-through, state frozen
        t    = 1'b1;
        d_in = 16'($urandom);
        ctl  = 5'($urandom);
        #1;
        check(q == {ctl, d_in}, "transparent pass-through");
        seen_transp++;
        @(posedge clk); #1;
        t = 1'b0;
        continue;
      end
      i      = pick_instr();
      d      = 12'($urandom_range(0, 15) == 0 ? $urandom_range(0, 3) : $urandom);
      cc_n   = 1'($urandom);
      ccen_n = ($urandom_range(0, 3) == 0);
      ci     = ($urandom_range(0, 7) != 0);
      rld_n  = ($urandom_range(0, 15) != 0);
      oe_n   = ($urandom_range(0, 15) == 0);
      // small counter values so that loops terminate now and then
      if (i inside {4'd4, 4'd12} || !rld_n) d = 12'($urandom_range(0, 4));
      d_in = {i, d};
      ctl  = {cc_n, ccen_n, ci, rld_n, oe_n};
      #1;
      if (m.depth() == 5) seen_full++;
      if (!rld_n) seen_rld++;
      if (oe_n) seen_oe++;
      seen_instr[i]++;
      exp = m.step(i, d, cc_n, ccen_n, ci, rld_n, oe_n);
      check(q[15:0] == exp, $sformatf("instr %0d: got %h expected %h", i, q[15:0], exp));
      check(q[20:16] == 5'b0, "extra outputs zero in normal mode");
      @(posedge clk); #1;
    end
    for (int k = 0; k < 16; k++) check(seen_instr[k] > 0, $sformatf("instruction %0d exercised", k));
    check(seen_full > 0, "stack full reached");
    check(seen_rld > 0, "counter reload exercised");
    check(seen_oe > 0, "output disable exercised");
    check(seen_transp > 0, "transparent mode exercised");
    $display("stack full in %0d cycles, transparent cycles %0d", seen_full, seen_transp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
