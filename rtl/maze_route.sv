// MR: the maze-routing unit of one router input lane.
//
// Maze routing delivers a flit whenever a path to its destination exists, using only
// the health of the current router's own links. A flit starts in normal mode and takes
// a productive output (one that lowers the Manhattan distance, MD, to the destination)
// through a healthy link. When no productive healthy output exists, the flit enters
// traversal mode: it records MD here as md_best, this router as ntrav, picks a hand
// rule, and leaves by the first healthy output found by sweeping from the direction of
// the destination away from the hand side (dir_trav). In traversal it then follows the
// hand rule around the faulty region (right hand: try right, straight, left, back) until
// it stands closer than md_best with a productive healthy output, where it returns to
// normal mode. If it comes back to ntrav and the hand rule would take dir_trav again,
// the destination is unreachable: the flit is marked, its destination becomes its
// source, and it is carried back there in normal mode.
//
// Purely combinational: the decision (field want) and the updated header appear in the
// same cycle. lane is the input port the flit arrived on, so the flit is moving in the
// opposite direction. The algorithm follows the design's maze routing; the exit test
// (strictly closer than md_best), the X-before-Y choice among productive outputs, the
// sweep used to pick dir_trav and the return of unreachable flits to their source are
// this implementation's readings of points the design leaves open.
module maze_route
  import maze_pkg::*;
(
  input  flit_t      fin,
  input  dir_t       lane,
  input  coord_t     cur_x,
  input  coord_t     cur_y,
  input  logic [3:0] link_ok,     // indexed by dir_t
  input  hand_t      hand_sel,    // hand rule to use if traversal starts here
  output flit_t      fout,
  output logic       ev_enter,
  output logic       ev_exit,
  output logic       ev_unreach
);
  logic signed [COORD_W:0] dx, dy;
  logic [MD_W-1:0]         md_cur;
  logic [3:0]              prod, prod_ok;
  logic                    at_dst;
  dir_t                    heading, d_prod, d_sweep, d_hand, d_any;

  function automatic logic [MD_W-1:0] absv(logic signed [COORD_W:0] v);
    return (v < 0) ? MD_W'(-v) : MD_W'(v);
  endfunction

  // First healthy direction of the sequence s, s+step, s+2*step, s+3*step (s if none).
  function automatic dir_t first_ok(dir_t s, logic [1:0] step, logic [3:0] ok);
    dir_t d;
    d = s;
    for (int k = 3; k >= 0; k--) begin
      if (ok[2'(s + 2'(k) * step)]) begin
        d = dir_t'(s + 2'(k) * step);
      end
    end
    return d;
  endfunction

  always_comb begin
    dx      = $signed({1'b0, fin.dst_x}) - $signed({1'b0, cur_x});
    dy      = $signed({1'b0, fin.dst_y}) - $signed({1'b0, cur_y});
    md_cur  = absv(dx) + absv(dy);
    at_dst  = (dx == 0) && (dy == 0);
    prod    = '0;
    prod[DIR_N] = dy > 0;
    prod[DIR_S] = dy < 0;
    prod[DIR_E] = dx > 0;
    prod[DIR_W] = dx < 0;
    prod_ok = prod & link_ok;
    heading = dir_opposite(lane);
  end

  // productive choice: X dimension first
  always_comb begin
    if      (prod_ok[DIR_E]) d_prod = DIR_E;
    else if (prod_ok[DIR_W]) d_prod = DIR_W;
    else if (prod_ok[DIR_N]) d_prod = DIR_N;
    else                     d_prod = DIR_S;
  end

  // sweep from the destination direction, used when traversal starts
  dir_t sweep_start;
  always_comb begin
    if (hand_sel == HAND_RIGHT) begin            // counter-clockwise sweep
      if      (dx > 0 && dy >= 0) sweep_start = (dy == 0) ? DIR_E : DIR_N;
      else if (dx <= 0 && dy > 0) sweep_start = (dx == 0) ? DIR_N : DIR_W;
      else if (dx < 0 && dy <= 0) sweep_start = (dy == 0) ? DIR_W : DIR_S;
      else                        sweep_start = (dx == 0) ? DIR_S : DIR_E;
      d_sweep = first_ok(sweep_start, 2'd3, link_ok);
    end else begin                               // clockwise sweep
      if      (dx > 0 && dy >= 0) sweep_start = DIR_E;
      else if (dx <= 0 && dy > 0) sweep_start = DIR_N;
      else if (dx < 0 && dy <= 0) sweep_start = DIR_W;
      else                        sweep_start = DIR_S;
      d_sweep = first_ok(sweep_start, 2'd1, link_ok);
    end
    // hand rule from the current heading
    if (fin.hand == HAND_RIGHT) d_hand = first_ok(dir_t'(heading + 2'd1), 2'd3, link_ok);
    else                        d_hand = first_ok(dir_t'(heading + 2'd3), 2'd1, link_ok);
    d_any = first_ok(DIR_N, 2'd1, link_ok);
  end

  always_comb begin
    fout       = fin;
    ev_enter   = 1'b0;
    ev_exit    = 1'b0;
    ev_unreach = 1'b0;
    if (fin.valid) begin
      if (at_dst) begin
        // at the destination but not ejected this cycle: go out and come back
        fout.want = d_any;
        fout.mode = MODE_NORMAL;
      end else if (fin.mode == MODE_NORMAL) begin
        if (prod_ok != '0) begin
          fout.want = d_prod;
        end else begin
          fout.mode     = MODE_TRAV;
          fout.md_best  = md_cur;
          fout.ntrav_x  = cur_x;
          fout.ntrav_y  = cur_y;
          fout.hand     = hand_sel;
          fout.dir_trav = d_sweep;
          fout.want     = d_sweep;
          ev_enter      = 1'b1;
        end
      end else begin
        if (md_cur < fin.md_best && prod_ok != '0) begin
          fout.mode = MODE_NORMAL;
          fout.want = d_prod;
          ev_exit   = 1'b1;
        end else if (cur_x == fin.ntrav_x && cur_y == fin.ntrav_y &&
                     d_hand == fin.dir_trav && !fin.unreach) begin
          fout.unreach = 1'b1;
          fout.dst_x   = fin.src_x;
          fout.dst_y   = fin.src_y;
          fout.mode    = MODE_NORMAL;
          fout.want    = d_hand;
          ev_unreach   = 1'b1;
        end else begin
          fout.want = d_hand;
        end
      end
    end
  end
endmodule
