// transparent_m -- the small combinational example module M made transparent
// by an embedded multiplexer.
//
// Normal mode (t = 0): a 4-bit code x is classified into one of four groups
// and the group number is driven on the 2-bit output z:
//   group 0: x in {1, 3, 12, 14}      group 1: x in {0, 2, 5, 7}
//   group 2: x in {6, 9, 11, 15}      group 3: x in {4, 8, 10, 13}
// Transparent mode (t = 1): the four input bits leave the module unchanged,
// the upper two on z and the lower two on the extra port y, so that all of x
// is observable in a single cycle.  In normal mode y is driven to zero.
//
// Purely combinational, no clock.  The grouping table, the mode control and
// the bit assignment of the pass-through follow the document; driving y to
// zero in normal mode is this design's choice (the document leaves y
// unassigned there).
module transparent_m (
  input  logic [3:0] x,
  input  logic       t,
  output logic [1:0] z,
  output logic [1:0] y
);

  function automatic logic [1:0] classify(input logic [3:0] v);
    unique case (v)
      4'd1, 4'd3, 4'd12, 4'd14: return 2'd0;
      4'd0, 4'd2, 4'd5,  4'd7:  return 2'd1;
      4'd6, 4'd9, 4'd11, 4'd15: return 2'd2;
      default:                  return 2'd3;  // 4, 8, 10, 13
    endcase
  endfunction

  always_comb begin
    if (t) begin
      z = x[3:2];
      y = x[1:0];
    end else begin
      z = classify(x);
      y = 2'b00;
    end
  end

endmodule
