// tsys_pkg -- widths and test-control codes shared by the transparent
// example system S.
//
// The system is a chain of five synthesizable modules (M0 multiplier, M1 GCD,
// M2 Barcode, M3 Kalman, M4 Am2910).  Every module has a transparency control
// T: with T=0 it does its normal job, with T=1 it is a purely combinational
// pass-through from its inputs to its outputs.  For that pass-through to carry
// every bit, some buses are wider than the normal function needs.  The
// constants below are the bus widths of the acyclic system graph before
// (W_*) and after (WS_*) widening.  All the numbers are the document's
// (system graph and widened graph); the session codes are this design's own.
package tsys_pkg;

  // Number of modules that take part in the hierarchical test.
  localparam int unsigned NMOD = 5;

  // Original edge widths (graph G).
  localparam int unsigned W_0  = 32;  // inputs  -> M0 (X1,X2)
  localparam int unsigned W_1  = 32;  // M0      -> M1
  localparam int unsigned W_2  = 16;  // M1      -> fanout F0
  localparam int unsigned W_3  = 16;  // F0      -> Z1 (through the output mux)
  localparam int unsigned W_4  = 6;   // F0      -> M2 (truncated)
  localparam int unsigned W_5  = 5;   // loop    -> M2 (feedback, broken in test)
  localparam int unsigned W_6  = 18;  // M2      -> fanout F1
  localparam int unsigned W_7  = 5;   // F1      -> M4
  localparam int unsigned W_8  = 15;  // F1      -> M3
  localparam int unsigned W_9  = 16;  // M3      -> Z1 (through the output mux)
  localparam int unsigned W_10 = 16;  // M3      -> M4
  localparam int unsigned W_11 = 16;  // M4      -> Z2

  // Widened edge widths (graph G*).
  localparam int unsigned WS_0  = 32;
  localparam int unsigned WS_1  = 32;
  localparam int unsigned WS_2  = 32;
  localparam int unsigned WS_3  = 16;
  localparam int unsigned WS_4  = 16;
  localparam int unsigned WS_5  = 5;
  localparam int unsigned WS_6  = 21;
  localparam int unsigned WS_7  = 5;
  localparam int unsigned WS_8  = 16;
  localparam int unsigned WS_9  = 16;
  localparam int unsigned WS_10 = 16;
  localparam int unsigned WS_11 = 21;

  // Test-session select: ceil(log2(NMOD)) = 3 control pins.  Codes 0..4
  // test module M0..M4 (that module functional, all others transparent),
  // ALL_TRANSPARENT sets every module transparent for interconnect test, and
  // the remaining codes are normal operation.
  localparam int unsigned SEL_W = $clog2(NMOD);

  typedef enum logic [SEL_W-1:0] {
    SESS_M0          = 3'd0,
    SESS_M1          = 3'd1,
    SESS_M2          = 3'd2,
    SESS_M3          = 3'd3,
    SESS_M4          = 3'd4,
    SESS_INTERCONNECT = 3'd5,
    SESS_NORMAL_ALT  = 3'd6,
    SESS_NORMAL      = 3'd7
  } session_e;

endpackage
