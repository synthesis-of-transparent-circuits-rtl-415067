// am2910_t -- module M4 of the example system: an Am2910-style microprogram
// sequencer with an embedded transparency multiplexer.
//
// Sequencer (t = 0).  Each cycle the 4-bit instruction I selects the next
// microaddress Y from one of four sources: the direct input D, the
// register/counter R, the top of a 5-deep subroutine/loop stack F, or the
// microprogram counter uPC.  On the clock edge uPC <= Y + CI, and the stack
// and R are updated as the instruction says (push uPC, pop, load R from D,
// decrement R).  The condition passes when CCEN_n = 1 or CC_n = 0.  RLD_n = 0
// loads R from D whatever the instruction.  PL_n, MAP_n and VECT_n are the
// active-low enables of the three possible D sources (MAP_n for JMAP, VECT_n
// for CJV, PL_n for all others) and FULL_n is low while the stack holds five
// entries.  A push onto a full stack overwrites its top entry; a pop of an
// empty stack leaves it empty, and an empty stack reads as zero.  JZ clears
// the stack.
//
// Port mapping onto the system buses (16 + 5 bits in, 16 (+5) bits out):
//   d_in[15:12] = I,  d_in[11:0] = D
//   ctl = {CC_n, CCEN_n, CI, RLD_n, OE_n}
//   q[15:0]  = {FULL_n, PL_n, MAP_n, VECT_n, Y}
//   q[20:16] = extra transparent-mode outputs, zero in normal mode
// OE_n = 1 forces Y to zero on the outputs (a two-state stand-in for the
// chip's high-impedance state; the internal Y still updates uPC).
//
// Transparent mode (t = 1): q = {ctl, d_in}; all 21 inputs pass unchanged in
// the same cycle.  Registers hold while t = 1 (equivalent to gating the
// clock).  Reset (active low, synchronous) clears uPC, R and the stack.
//
// Timing: Y and the status outputs are combinational from the inputs and the
// state; one instruction per clock.
//
// The 16+5 input and 16 output widths and the five extra transparent outputs
// are the document's.  The sequencer follows the published behaviour of the
// Am2910 part; the assignment of its pins to bus bits, the OE_n stand-in and
// the reset are this design's choices.
module am2910_t
  import am2910_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        t,
  input  logic [15:0] d_in,
  input  logic [4:0]  ctl,
  output logic [20:0] q
);

  localparam int unsigned SPW = $clog2(DEPTH + 1);

  instr_e        instr;
  logic [AW-1:0] d;
  logic          cc_n, ccen_n, ci, rld_n, oe_n;

  assign instr = instr_e'(d_in[15:12]);
  assign d     = d_in[AW-1:0];
  assign {cc_n, ccen_n, ci, rld_n, oe_n} = ctl;

  logic [AW-1:0]  upc, r;
  logic [AW-1:0]  stk [DEPTH];
  logic [SPW-1:0] sp;              // number of entries on the stack

  logic [AW-1:0] tos;
  logic          pass, r_zero;
  assign tos    = (sp == '0) ? '0 : stk[sp - SPW'(1)];
  assign pass   = ccen_n | ~cc_n;
  assign r_zero = (r == '0);

  // Next-address selection and the stack / counter actions it implies.
  logic [AW-1:0] y;
  logic          push, pop, clear, load_r, dec_r;
  logic          pl_n, map_n, vect_n;

  always_comb begin
    y      = upc;
    push   = 1'b0;
    pop    = 1'b0;
    clear  = 1'b0;
    load_r = 1'b0;
    dec_r  = 1'b0;
    pl_n   = 1'b0;
    map_n  = 1'b1;
    vect_n = 1'b1;
    unique case (instr)
      I_JZ:   begin y = '0; clear = 1'b1; end
      I_CJS:  if (pass) begin y = d; push = 1'b1; end
      I_JMAP: begin y = d; pl_n = 1'b1; map_n = 1'b0; end
      I_CJP:  if (pass) y = d;
      I_PUSH: begin push = 1'b1; load_r = pass; end
      I_JSRP: begin y = pass ? d : r; push = 1'b1; end
      I_CJV:  begin pl_n = 1'b1; vect_n = 1'b0; if (pass) y = d; end
      I_JRP:  y = pass ? d : r;
      I_RFCT: if (!r_zero) begin y = tos; dec_r = 1'b1; end
              else pop = 1'b1;
      I_RPCT: if (!r_zero) begin y = d; dec_r = 1'b1; end
      I_CRTN: if (pass) begin y = tos; pop = 1'b1; end
      I_CJPP: if (pass) begin y = d; pop = 1'b1; end
      I_LDCT: load_r = 1'b1;
      I_LOOP: if (pass) pop = 1'b1;
              else y = tos;
      I_TWB:  begin
                if (!r_zero) begin
                  dec_r = 1'b1;
                  if (pass) pop = 1'b1;
                  else      y = tos;
                end else begin
                  pop = 1'b1;
                  if (!pass) y = d;
                end
              end
      I_CONT: ;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      upc <= '0;
      r   <= '0;
      sp  <= '0;
      for (int i = 0; i < DEPTH; i++) stk[i] <= '0;
    end else if (!t) begin
      upc <= y + AW'(ci);
      if (!rld_n || load_r) r <= d;
      else if (dec_r)       r <= r - AW'(1);
      if (clear) begin
        sp <= '0;
      end else if (push) begin
        if (sp == SPW'(DEPTH)) stk[DEPTH-1] <= upc;
        else begin
          stk[sp] <= upc;
          sp      <= sp + SPW'(1);
        end
      end else if (pop && sp != '0) begin
        sp <= sp - SPW'(1);
      end
    end
  end

  logic full_n;
  assign full_n = (sp != SPW'(DEPTH));

  always_comb begin
    if (t) q = {ctl, d_in};
    else   q = {5'b0, full_n, pl_n, map_n, vect_n, (oe_n ? {AW{1'b0}} : y)};
  end

  // The stack never holds more than DEPTH entries.
  always_ff @(posedge clk) begin
    if (rst_n) assert (sp <= SPW'(DEPTH)) else $error("am2910_t: stack pointer out of range");
  end

endmodule
