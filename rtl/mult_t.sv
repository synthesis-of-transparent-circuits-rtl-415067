// mult_t -- module M0 of the example system: a combinational multiplier with
// an embedded transparency multiplexer.
//
// Normal mode (t = 0): p = a * b, the full 2*W-bit unsigned product.
// Transparent mode (t = 1): p = {a, b}; both operands reach the next module
// unchanged in the same cycle, which is what lets test data for the modules
// behind M0 be applied from the chip inputs X1 and X2.
//
// Purely combinational.  Operand width 16 and product width 32 are the
// document's; unsigned arithmetic and the operand order in the pass-through
// are this design's choices.
module mult_t #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  logic           t,
  output logic [2*W-1:0] p
);

  always_comb begin
    if (t) p = {a, b};
    else   p = a * b;
  end

endmodule
