// system_s -- hierarchically testable example system S built from transparent
// modules, with the small example module M beside it.
//
// S is a chain of five synthesizable modules: M0 a 16x16 combinational
// multiplier fed from chip inputs X1/X2, M1 a GCD unit, M2 Barcode, M3
// Kalman and M4 an Am2910 sequencer driving chip output Z2.  The GCD result
// fans out to chip output Z1 (through a mux shared with the Kalman output)
// and, truncated to 6 bits, to Barcode; Barcode's 18-bit output feeds Kalman
// (15 bits) and Am2910 (5 bits); five bits of the Am2910 output (Z2[4:0])
// return to Barcode over a feedback loop.
//
// Every module has an embedded transparency mux.  A 3-bit session select
// (test_ctrl) puts exactly one module in its normal mode and all others in
// pass-through mode, so the module's precomputed test vectors are applied
// from X1/X2/TI and its responses observed on Z1/Z2/Z2X in the same cycle,
// with no vector translation.  For this the buses are widened (graph G*):
//   M0->M1 32, M1->F0 32 (16 to Z1, 16 to M2), M2 in 16+5, M2 out 21
//   (5 to M4, 16 to M3), M3 in 16, M4 out 21 (16 on Z2, 5 on the new Z2X).
// The feedback loop is broken in test sessions: Barcode then takes its 5-bit
// loop input from the new chip pins TI instead of from Z2[4:0].  Session codes: 0..4 test M0..M4,
// 5 = all modules transparent (interconnect test), 6/7 = normal operation.
//
// The Barcode and Kalman cores are external to this RTL: their inputs leave
// on m2_core_a/m2_core_b and m3_core_in and their outputs return on
// m2_core_q, m3_core_qz and m3_core_qa.  gcd_done reports the GCD's
// completion pulse.  The example module M has its own ports m_*.
//
// Timing: all transparent paths are combinational.  M1 and M4 are clocked
// by clk with synchronous active-low reset rst_n.
//
// The structure, bus widths, widened widths, loop breaking and decoded
// session control are the document's; the bit order of the widened buses,
// the session codes, the Z1 mux polarity and gcd_done are this design's.
module system_s
  import tsys_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // system S
  input  logic [15:0]       x1,
  input  logic [15:0]       x2,
  input  logic              z1_sel,      // 0: GCD result, 1: Kalman output
  input  logic [SEL_W-1:0]  tsel,        // test session select
  input  logic [WS_5-1:0]   ti,          // loop bus drive in test mode
  output logic [15:0]       z1,
  output logic [15:0]       z2,
  output logic [WS_11-W_11-1:0] z2x,     // extra outputs for transparency
  output logic              gcd_done,
  // external Barcode core (M2)
  output logic [W_4-1:0]    m2_core_a,
  output logic [W_5-1:0]    m2_core_b,
  input  logic [W_6-1:0]    m2_core_q,
  // external Kalman core (M3)
  output logic [W_8-1:0]    m3_core_in,
  input  logic [W_9-1:0]    m3_core_qz,
  input  logic [W_10-1:0]   m3_core_qa,
  // example module M
  input  logic [3:0]        m_x,
  input  logic              m_t,
  output logic [1:0]        m_z,
  output logic [1:0]        m_y
);

  logic [NMOD-1:0] t;
  logic            test_mode;

  logic [WS_1-1:0]  e1;   // M0 -> M1
  logic [WS_2-1:0]  e2;   // M1 -> F0
  logic [WS_3-1:0]  e3;   // F0 -> Z1 mux
  logic [WS_4-1:0]  e4;   // F0 -> M2
  logic [W_5-1:0]   fb;   // loop bus M4 -> M2 (normal mode)
  logic [WS_6-1:0]  e6;   // M2 -> F1
  logic [WS_7-1:0]  e7;   // F1 -> M4
  logic [WS_8-1:0]  e8;   // F1 -> M3
  logic [WS_9-1:0]  e9;   // M3 -> Z1 mux
  logic [WS_10-1:0] e10;  // M3 -> M4
  logic [WS_11-1:0] e11;  // M4 -> Z2, Z2X

  test_ctrl u_ctrl (.sel(tsel), .t(t), .test_mode(test_mode));

  mult_t #(.W(16)) u_m0 (.a(x1), .b(x2), .t(t[0]), .p(e1));

  gcd_t #(.W(16), .NB(W_4)) u_m1 (
    .clk(clk), .rst_n(rst_n), .t(t[1]), .din(e1), .q(e2), .done(gcd_done)
  );

  // Fanout point F0, split in two halves by the widening.
  assign e3 = e2[WS_2-1:WS_4];
  assign e4 = e2[WS_4-1:0];

  // Feedback loop M4 -> M2; barcode_t replaces it by TI (edge W5 of the
  // acyclic graph) in test mode.
  assign fb = e11[W_5-1:0];

  barcode_t u_m2 (
    .b_in(e4), .fb_in(fb), .ti(ti), .loop_open(test_mode), .t(t[2]),
    .core_a(m2_core_a), .core_b(m2_core_b), .core_q(m2_core_q), .q(e6)
  );

  // Fanout point F1.
  assign e7 = e6[WS_6-1:WS_8];
  assign e8 = e6[WS_8-1:0];

  kalman_t u_m3 (
    .k_in(e8), .t(t[3]), .core_in(m3_core_in),
    .core_qz(m3_core_qz), .core_qa(m3_core_qa), .q_z(e9), .q_a(e10)
  );

  am2910_t u_m4 (
    .clk(clk), .rst_n(rst_n), .t(t[4]), .d_in(e10), .ctl(e7), .q(e11)
  );

  out_mux #(.W(16)) u_z1 (.in0(e3), .in1(e9), .sel(z1_sel), .out(z1));

  assign z2  = e11[W_11-1:0];
  assign z2x = e11[WS_11-1:W_11];

  transparent_m u_m (.x(m_x), .t(m_t), .z(m_z), .y(m_y));

endmodule
