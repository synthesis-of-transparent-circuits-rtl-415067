// test_ctrl -- test-session decoder for the transparent system.
//
// Exactly one module is tested per session: it runs in its normal mode while
// every other module is transparent.  Because only one T_i is 0 in a session,
// the NMOD transparency controls are decoded from ceil(log2 NMOD) select pins
// instead of being brought out one by one.
//   sel = i (i < NMOD)        : t[i] = 0, all other t = 1  (session for M_i)
//   sel = SESS_INTERCONNECT   : all t = 1 (every module transparent, used to
//                               test the wiring between modules)
//   any other code            : all t = 0 (normal operation)
// test_mode is 1 in every session and in the interconnect test; the system
// uses it to open its feedback loop and drive the loop bus from chip pins.
//
// Combinational.  The decoder and the one-zero rule are the document's; the
// codes for interconnect test and normal operation are this design's own.
module test_ctrl
  import tsys_pkg::*;
#(
  parameter int unsigned N = NMOD
) (
  input  logic [SEL_W-1:0] sel,
  output logic [N-1:0]     t,
  output logic             test_mode
);

  always_comb begin
    t         = '0;
    test_mode = 1'b0;
    if (sel < SEL_W'(N)) begin
      t         = '1;
      t[sel]    = 1'b0;
      test_mode = 1'b1;
    end else if (sel == SESS_INTERCONNECT) begin
      t         = '1;
      test_mode = 1'b1;
    end
  end

  // In a module session exactly one module is functional.
  always_comb begin
    if (sel < SEL_W'(N))
      assert ($countones(~t) == 1) else $error("test_ctrl: session without a single module under test");
  end

endmodule
