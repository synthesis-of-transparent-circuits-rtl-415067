// out_mux -- the multiplexer in front of chip output Z1.
//
// Z1 is shared by two 16-bit buses: the GCD result (sel = 0) and the Kalman
// output (sel = 1).  In the test architecture this sharing is how the two
// sink edges of the system graph reach a single set of output pins; sel is a
// chip input, so a test observes one bus at a time.
//
// Combinational.  The mux and its two sources are the document's; which
// select value picks which source is this design's choice.
module out_mux #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  input  logic         sel,
  output logic [W-1:0] out
);

  assign out = sel ? in1 : in0;

endmodule
