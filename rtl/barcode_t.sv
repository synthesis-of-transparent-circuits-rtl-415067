// barcode_t -- transparency layer of module M2 (Barcode) of the example
// system, including the multiplexer that breaks the system's feedback loop.
//
// The Barcode benchmark's own behaviour is not part of this design: its
// 11 inputs are brought out on core_a/core_b and its 18 outputs come back on
// core_q, so any implementation can be attached.  What this module adds is
// the embedded multiplexer and the widened ports that make M2 transparent,
// and the opening of the 5-bit loop bus that normally comes back from the
// Am2910 output:
//
//   inputs : b_in   (16) from the GCD, of which the core uses b_in[5:0]
//            fb_in  (5)  loop bus from the Am2910 output (normal mode)
//            ti     (5)  chip test pins that replace the loop bus in test mode
//            loop_open   1 in every test session
//   output : q      (21) split by the system into q[20:16] (to Am2910) and
//                        q[15:0] (to Kalman)
//   core_b = loop_open ? ti : fb_in
//   t = 0 : q[20:16] = core_q[17:13], q[15:0] = {0, core_q[14:0]}
//           (the two consumers share core_q[14:13], as in the original
//           18-bit fanout)
//   t = 1 : q = {ti, b_in}: all 16+5 input bits pass unchanged, in the same
//           cycle, to the Kalman and Am2910 inputs.
// t = 1 only ever occurs with loop_open = 1, so the pass-through takes the
// 5-bit input straight from ti.  This keeps the transparent path free of the
// loop bus and the netlist free of a combinational loop through M2 and M4.
//
// Combinational.  The widths (6+5 in, 18 out; 16+5 in, 21 out when widened)
// and the loop being replaced by chip pins in test mode are the document's;
// which core bits feed which consumer, the bit order of the pass-through and
// placing the loop multiplexer here are this design's choices.
module barcode_t (
  input  logic [15:0] b_in,
  input  logic [4:0]  fb_in,
  input  logic [4:0]  ti,
  input  logic        loop_open,
  input  logic        t,
  output logic [5:0]  core_a,
  output logic [4:0]  core_b,
  input  logic [17:0] core_q,
  output logic [20:0] q
);

  assign core_a = b_in[5:0];
  assign core_b = loop_open ? ti : fb_in;

  always_comb begin
    if (t) q = {ti, b_in};
    else   q = {core_q[17:13], 1'b0, core_q[14:0]};
  end

  // Transparency is only used in test mode, where the loop is open.
  always_comb begin
    if (t) assert (loop_open) else $error("barcode_t: transparent with the feedback loop closed");
  end

endmodule
