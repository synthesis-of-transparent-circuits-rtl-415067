// out_mux_tb -- Z1 output mux: sel = 0 passes in0, sel = 1 passes in1.
module out_mux_tb;
  logic [15:0] in0, in1, out;
  logic        sel;
  int checks = 0, failures = 0;

  out_mux dut (.in0(in0), .in1(in1), .sel(sel), .out(out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      in0 = 16'($urandom); in1 = 16'($urandom);
      if (in0 == in1) in1 = ~in0;
      sel = 1'b0; #1;
      checks++; if (out !== in0) begin failures++; $display("FAIL sel0"); end
      sel = 1'b1; #1;
      checks++; if (out !== in1) begin failures++; $display("FAIL sel1"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
