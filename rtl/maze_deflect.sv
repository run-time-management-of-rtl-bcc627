// Deflection stage at the outputs of the maze-routing minBD router.
//
// Input: the four flits as the permutation network has placed them on the output ports.
// Two things happen here. First, a flit placed on a port whose link is broken is moved
// to a free port with a healthy link (the router admits no more flits than it has
// healthy links, so such a port always exists). Second, every flit that leaves on a
// port other than the one maze routing asked for has been deflected: its maze-routing
// state is reset to normal mode, as the design requires so that the routing guarantees
// hold again from the next router on. Combinational. The reset of deflected flits
// follows the design; steering around broken links at this point is this
// implementation's choice.
module maze_deflect
  import maze_pkg::*;
(
  input  flit_t      fin  [4],
  input  logic [3:0] link_ok,
  output flit_t      fout [4],
  output logic       ev_deflect,
  output logic       ev_steer
);
  flit_t t [4];

  always_comb begin
    logic [3:0] used;
    t        = fin;
    ev_steer = 1'b0;
    for (int d = 0; d < 4; d++) used[d] = fin[d].valid && link_ok[d];
    for (int d = 0; d < 4; d++) begin
      if (fin[d].valid && !link_ok[d]) begin
        t[d]     = '0;
        ev_steer = 1'b1;
        for (int e = 3; e >= 0; e--) begin
          if (!used[e] && link_ok[e]) begin
            t[e]    = fin[d];
            used[e] = 1'b1;
            break;
          end
        end
      end
    end
    ev_deflect = 1'b0;
    for (int d = 0; d < 4; d++) begin
      fout[d] = t[d];
      if (t[d].valid && t[d].want != dir_t'(d)) begin
        fout[d].mode = MODE_NORMAL;
        ev_deflect   = 1'b1;
      end
      fout[d].silver = 1'b0;
    end
  end
endmodule
