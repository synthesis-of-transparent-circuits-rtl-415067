// am2910_model_pkg -- untimed reference model of the Am2910 sequencer used by
// the testbenches.  It is written independently of the RTL: the stack is a
// queue, and each instruction is evaluated as a whole (output and next state
// together).  step() returns the 16-bit output word {FULL_n, PL_n, MAP_n,
// VECT_n, Y} for the given inputs and then advances the state as one clock
// edge would.
package am2910_model_pkg;

  class am2910_model;
    bit [11:0] upc;
    bit [11:0] r;
    bit [11:0] stack[$];   // stack[$] is the top

    function new();
      reset();
    endfunction

    function void reset();
      upc = '0;
      r   = '0;
      stack.delete();
    endfunction

    function int depth();
      return stack.size();
    endfunction

    function bit [11:0] top();
      return (stack.size() == 0) ? 12'h000 : stack[$];
    endfunction

    function void do_push(bit [11:0] v);
      if (stack.size() == 5) stack[4] = v;
      else stack.push_back(v);
    endfunction

    function void do_pop();
      if (stack.size() > 0) void'(stack.pop_back());
    endfunction

    // instr, d, cc_n, ccen_n, ci, rld_n, oe_n
    function bit [15:0] step(bit [3:0] i, bit [11:0] d, bit cc_n, bit ccen_n,
                             bit ci, bit rld_n, bit oe_n);
      bit        ok  = ccen_n || !cc_n;
      bit        rnz = (r != 0);
      bit [11:0] y   = upc;
      bit        pl  = 0, mp = 1, vc = 1;
      bit [11:0] nr  = r;
      bit [11:0] pc  = upc;
      bit        fl  = (stack.size() != 5);  // depth before this instruction
      case (i)
        0:  begin y = 0; stack.delete(); end
        1:  if (ok) begin y = d; do_push(pc); end
        2:  begin y = d; pl = 1; mp = 0; end
        3:  if (ok) y = d;
        4:  begin do_push(pc); if (ok) nr = d; end
        5:  begin y = ok ? d : r; do_push(pc); end
        6:  begin pl = 1; vc = 0; if (ok) y = d; end
        7:  y = ok ? d : r;
        8:  if (rnz) begin y = top(); nr = r - 1; end else do_pop();
        9:  if (rnz) begin y = d; nr = r - 1; end
        10: if (ok) begin y = top(); do_pop(); end
        11: if (ok) begin y = d; do_pop(); end
        12: nr = d;
        13: if (ok) do_pop(); else y = top();
        14: ;
        15: if (rnz) begin
              nr = r - 1;
              if (ok) do_pop(); else y = top();
            end else begin
              if (!ok) y = d;
              do_pop();
            end
      endcase
      if (!rld_n) nr = d;
      r   = nr;
      upc = y + 12'(ci);
      return {fl, pl, mp, vc, oe_n ? 12'h000 : y};
    endfunction
  endclass

endpackage
