// kalman_t -- transparency layer of module M3 (Kalman) of the example
// system.
//
// The Kalman benchmark's own arithmetic is not part of this design: its
// 15-bit input is brought out on core_in and its two 16-bit outputs come back
// on core_qz (towards the Z1 mux) and core_qa (towards the Am2910).  This
// module adds the embedded multiplexer and the widened input that make M3
// transparent:
//   t = 0 : q_z = core_qz, q_a = core_qa   (core_in = k_in[14:0])
//   t = 1 : q_z = q_a = k_in               (all 16 input bits, same cycle)
// The input is widened from 15 to 16 bits so that the 16-bit Am2910 input
// behind M3 can be fully driven through it.
//
// Combinational.  Widths are the document's; copying the input to both
// outputs in transparent mode is this design's choice.
module kalman_t (
  input  logic [15:0] k_in,
  input  logic        t,
  output logic [14:0] core_in,
  input  logic [15:0] core_qz,
  input  logic [15:0] core_qa,
  output logic [15:0] q_z,
  output logic [15:0] q_a
);

  assign core_in = k_in[14:0];

  always_comb begin
    if (t) begin
      q_z = k_in;
      q_a = k_in;
    end else begin
      q_z = core_qz;
      q_a = core_qa;
    end
  end

endmodule
