// gcd_t -- module M1 of the example system: a sequential greatest-common-
// divisor unit with an embedded transparency multiplexer.
//
// Function (t = 0): the 2*W-bit input din carries two unsigned operands,
// din[2W-1:W] and din[W-1:0].  The unit samples them, runs Euclid's
// algorithm by repeated subtraction (the larger operand is reduced by the
// smaller one per clock), then publishes the result and pulses done for one
// cycle and samples din again.  gcd(a, 0) = a and gcd(0, 0) = 0.
//
// Output q is 2*W bits wide because the transparent mode must pass all of din
// (the widened bus of the system).  Its upper half is the bus towards chip
// output Z1 and its lower half the bus towards the Barcode module, which in
// normal mode carries only the low NB result bits (a truncated copy):
//   t = 0 : q = {result, zero-extended result[NB-1:0]}
//   t = 1 : q = din  (combinational pass-through, same cycle)
// While t = 1 the state registers hold their values (equivalent to gating the
// clock with t), and done stays low.
//
// Timing: if the operands need k subtraction steps, done and the new result
// appear k+2 clock edges after the edge that sampled them.  Reset is active
// low and synchronous to clk.
//
// The operand and result widths, the truncation to 6 bits and the widened
// 32-bit output are the document's.  The subtraction algorithm, the
// free-running sample/compute loop, the done pulse and holding state in
// transparent mode are this design's choices.
module gcd_t #(
  parameter int unsigned W  = 16,
  parameter int unsigned NB = 6
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           t,
  input  logic [2*W-1:0] din,
  output logic [2*W-1:0] q,
  output logic           done
);

  typedef enum logic {S_LOAD, S_CALC} state_e;

  state_e       state;
  logic [W-1:0] x, y, result;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_LOAD;
      x      <= '0;
      y      <= '0;
      result <= '0;
      done   <= 1'b0;
    end else if (t) begin
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_LOAD: begin
          x     <= din[2*W-1:W];
          y     <= din[W-1:0];
          state <= S_CALC;
        end
        S_CALC: begin
          if (x == y || x == '0 || y == '0) begin
            result <= (x == '0) ? y : x;
            done   <= 1'b1;
            state  <= S_LOAD;
          end else if (x > y) begin
            x <= x - y;
          end else begin
            y <= y - x;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  always_comb begin
    if (t) q = din;
    else   q = {result, {(W-NB){1'b0}}, result[NB-1:0]};
  end

endmodule
