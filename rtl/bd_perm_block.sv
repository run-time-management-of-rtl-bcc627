// One 2x2 arbitration block of the minBD permutation network.
//
// Two flits come in (a on the upper input, b on the lower); each wants one of the two
// outputs. The higher-priority flit gets the output it wants and the other flit takes
// the remaining output, so nothing is ever dropped: a flit that loses is deflected. The
// silver flit (one per router per cycle) has priority; otherwise the upper input wins.
// STAGE selects which bit of the wanted direction picks the output: in the first stage
// bit 1 (N,E -> o0 side, S,W -> o1 side), in the second stage bit 0 (N or S -> o0,
// E or W -> o1). Combinational. The design shows the four blocks and their wiring;
// the priority rule inside a block is this implementation's choice.
module bd_perm_block
  import maze_pkg::*;
#(
  parameter int unsigned STAGE = 0
) (
  input  flit_t a,
  input  flit_t b,
  output flit_t o0,
  output flit_t o1
);
  logic a_first, pref_a, pref_b;

  always_comb begin
    pref_a = (STAGE == 0) ? a.want[1] : a.want[0];
    pref_b = (STAGE == 0) ? b.want[1] : b.want[0];
    if (a.valid && b.valid) a_first = a.silver || !b.silver;
    else                    a_first = a.valid;
    o0 = '0;
    o1 = '0;
    if (a_first) begin
      if (pref_a) begin o1 = a; o0 = b; end
      else        begin o0 = a; o1 = b; end
    end else begin
      if (pref_b) begin o1 = b; o0 = a; end
      else        begin o0 = b; o1 = a; end
    end
  end
endmodule
