// am2910_pkg -- instruction codes of the Am2910 microprogram sequencer
// (module M4 of the example system), shared by the RTL and its testbenches.
package am2910_pkg;

  typedef enum logic [3:0] {
    I_JZ   = 4'd0,   // jump to address zero, clear the stack
    I_CJS  = 4'd1,   // conditional jump to subroutine (D)
    I_JMAP = 4'd2,   // jump to D, MAP enable active
    I_CJP  = 4'd3,   // conditional jump to D
    I_PUSH = 4'd4,   // push uPC, conditionally load counter from D
    I_JSRP = 4'd5,   // conditional jump to subroutine, D or R
    I_CJV  = 4'd6,   // conditional jump to D, VECT enable active
    I_JRP  = 4'd7,   // conditional jump to D or R
    I_RFCT = 4'd8,   // repeat loop (stack) while counter != 0
    I_RPCT = 4'd9,   // repeat D while counter != 0
    I_CRTN = 4'd10,  // conditional return
    I_CJPP = 4'd11,  // conditional jump to D and pop
    I_LDCT = 4'd12,  // load counter from D, continue
    I_LOOP = 4'd13,  // test end of loop
    I_CONT = 4'd14,  // continue
    I_TWB  = 4'd15   // three-way branch
  } instr_e;

  localparam int unsigned AW    = 12;  // address / data width
  localparam int unsigned DEPTH = 5;   // stack depth

endpackage
