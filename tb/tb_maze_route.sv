// Self-checking testbench of maze_route, the maze-routing unit of one lane.
//
// The unit is combinational, so each case sets a flit, the lane it arrived on, the
// router position and the health of the four links, and compares the chosen output
// and the updated header with values worked out by hand from the routing rules:
// productive X-first choice, entering traversal (sweep from the destination direction,
// counter-clockwise for the right hand, clockwise for the left), the right- and left-
// hand rules, the exit when strictly closer than md_best with a productive link, the
// unreachable case at the traversal start, and a flit at its destination. Directions
// are N=0, E=1, S=2, W=3. Each case also checks the three event outputs.
module tb_maze_route;
  import maze_pkg::*;
  flit_t      fin, fout;
  dir_t       lane;
  coord_t     cur_x, cur_y;
  logic [3:0] link_ok;
  hand_t      hand_sel;
  logic       ev_enter, ev_exit, ev_unreach;

  maze_route dut (.fin, .lane, .cur_x, .cur_y, .link_ok, .hand_sel, .fout,
                  .ev_enter, .ev_exit, .ev_unreach);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clk = 0;
  always #5 clk = ~clk;

  function automatic flit_t mk(int sx, int sy, int dx, int dy, mode_t m, hand_t h, int mdb,
                               int nx, int ny, dir_t dt, bit unr);
    flit_t f;
    f = '0;
    f.valid = 1; f.src_x = coord_t'(sx); f.src_y = coord_t'(sy);
    f.dst_x = coord_t'(dx); f.dst_y = coord_t'(dy); f.mode = m; f.hand = h;
    f.md_best = MD_W'(mdb); f.ntrav_x = coord_t'(nx); f.ntrav_y = coord_t'(ny);
    f.dir_trav = dt; f.unreach = unr; f.payload = 32'h1234;
    return f;
  endfunction

  task automatic run(string name, flit_t f, dir_t ln, int x, int y, logic [3:0] ok, hand_t hs,
                     dir_t want, mode_t mode, bit enter, bit exit_, bit unr);
    fin = f; lane = ln; cur_x = coord_t'(x); cur_y = coord_t'(y); link_ok = ok; hand_sel = hs;
    #1;
    check(fout.want == want, $sformatf("%s: want %0d, expected %0d", name, fout.want, want));
    check(fout.mode == mode, $sformatf("%s: mode", name));
    check(ev_enter == enter && ev_exit == exit_ && ev_unreach == unr,
          $sformatf("%s: events %b%b%b", name, ev_enter, ev_exit, ev_unreach));
    check(fout.payload == 32'h1234, $sformatf("%s: payload kept", name));
  endtask

  initial begin
    flit_t f;
    // normal mode
    run("X first", mk(0,0, 6,6, MODE_NORMAL, HAND_RIGHT, 0, 0,0, DIR_N, 0), DIR_W, 4,4, 4'b1111,
        HAND_RIGHT, DIR_E, MODE_NORMAL, 0,0,0);
    run("Y when X broken", mk(0,0, 6,6, MODE_NORMAL, HAND_RIGHT, 0, 0,0, DIR_N, 0), DIR_W, 4,4,
        4'b1101, HAND_RIGHT, DIR_N, MODE_NORMAL, 0,0,0);
    run("west", mk(0,0, 1,4, MODE_NORMAL, HAND_RIGHT, 0, 0,0, DIR_N, 0), DIR_E, 4,4, 4'b1111,
        HAND_RIGHT, DIR_W, MODE_NORMAL, 0,0,0);
    run("south", mk(0,0, 4,0, MODE_NORMAL, HAND_RIGHT, 0, 0,0, DIR_N, 0), DIR_N, 4,4, 4'b1111,
        HAND_RIGHT, DIR_S, MODE_NORMAL, 0,0,0);
    // entering traversal: destination straight north, north link broken
    f = mk(1,2, 4,7, MODE_NORMAL, HAND_RIGHT, 0, 0,0, DIR_N, 0);
    run("enter right", f, DIR_S, 4,4, 4'b1110, HAND_RIGHT, DIR_W, MODE_TRAV, 1,0,0);
    check(fout.md_best == 3 && fout.ntrav_x == 4 && fout.ntrav_y == 4 &&
          fout.dir_trav == DIR_W && fout.hand == HAND_RIGHT, "enter right: header recorded");
    run("enter left", f, DIR_S, 4,4, 4'b1110, HAND_LEFT, DIR_E, MODE_TRAV, 1,0,0);
    check(fout.dir_trav == DIR_E && fout.hand == HAND_LEFT, "enter left: header recorded");
    run("enter right, W also broken", f, DIR_S, 4,4, 4'b0110, HAND_RIGHT, DIR_S, MODE_TRAV, 1,0,0);
    // destination north-east, both productive links broken: right-hand sweep N, W
    run("enter NE right", mk(1,2, 6,6, MODE_NORMAL, HAND_RIGHT, 0, 0,0, DIR_N, 0), DIR_W, 4,4,
        4'b1100, HAND_RIGHT, DIR_W, MODE_TRAV, 1,0,0);
    // left-hand sweep from E clockwise: E, S
    run("enter NE left", mk(1,2, 6,6, MODE_NORMAL, HAND_RIGHT, 0, 0,0, DIR_N, 0), DIR_W, 4,4,
        4'b1100, HAND_LEFT, DIR_S, MODE_TRAV, 1,0,0);
    // traversal, right hand, heading east (arrived on W): right is S
    run("right hand", mk(1,2, 4,7, MODE_TRAV, HAND_RIGHT, 3, 3,4, DIR_W, 0), DIR_W, 4,4, 4'b1111,
        HAND_RIGHT, DIR_S, MODE_TRAV, 0,0,0);
    run("right hand, S broken", mk(1,2, 4,7, MODE_TRAV, HAND_RIGHT, 3, 3,4, DIR_W, 0), DIR_W, 4,4,
        4'b1011, HAND_RIGHT, DIR_E, MODE_TRAV, 0,0,0);
    run("right hand, S E broken", mk(1,2, 4,7, MODE_TRAV, HAND_RIGHT, 3, 3,4, DIR_W, 0), DIR_W, 4,4,
        4'b1001, HAND_RIGHT, DIR_N, MODE_TRAV, 0,0,0);
    // traversal, left hand, heading east: left is N, then E
    run("left hand", mk(1,2, 4,0, MODE_TRAV, HAND_LEFT, 4, 3,4, DIR_W, 0), DIR_W, 4,4, 4'b1111,
        HAND_RIGHT, DIR_N, MODE_TRAV, 0,0,0);
    run("left hand, N broken", mk(1,2, 4,0, MODE_TRAV, HAND_LEFT, 4, 3,4, DIR_W, 0), DIR_W, 4,4,
        4'b1110, HAND_RIGHT, DIR_E, MODE_TRAV, 0,0,0);
    // exit: MD 1 < md_best 3 and north healthy
    run("exit", mk(1,2, 5,7, MODE_TRAV, HAND_RIGHT, 3, 4,4, DIR_W, 0), DIR_S, 5,6, 4'b1111,
        HAND_RIGHT, DIR_N, MODE_NORMAL, 0,1,0);
    // closer but the productive link is broken: keep following the hand (heading N: E)
    run("no exit", mk(1,2, 5,7, MODE_TRAV, HAND_RIGHT, 3, 4,4, DIR_W, 0), DIR_S, 5,6, 4'b1110,
        HAND_RIGHT, DIR_E, MODE_TRAV, 0,0,0);
    // not closer: no exit although north is healthy (heading N, right hand: E)
    run("equal MD", mk(1,2, 5,7, MODE_TRAV, HAND_RIGHT, 1, 4,4, DIR_W, 0), DIR_S, 5,6, 4'b1111,
        HAND_RIGHT, DIR_E, MODE_TRAV, 0,0,0);
    // unreachable: back at ntrav, heading S (arrived on N), right hand picks W == dir_trav
    f = mk(1,2, 4,7, MODE_TRAV, HAND_RIGHT, 3, 4,4, DIR_W, 0);
    run("unreachable", f, DIR_N, 4,4, 4'b1110, HAND_RIGHT, DIR_W, MODE_NORMAL, 0,0,1);
    check(fout.unreach && fout.dst_x == 1 && fout.dst_y == 2, "unreachable: sent back to source");
    f.unreach = 1;
    run("already unreachable", f, DIR_N, 4,4, 4'b1110, HAND_RIGHT, DIR_W, MODE_TRAV, 0,0,0);
    // at ntrav but the hand rule picks another direction: not unreachable
    run("ntrav, other dir", mk(1,2, 4,7, MODE_TRAV, HAND_RIGHT, 3, 4,4, DIR_E, 0), DIR_N, 4,4,
        4'b1110, HAND_RIGHT, DIR_W, MODE_TRAV, 0,0,0);
    // at the destination, not ejected: any healthy output (first from N clockwise)
    run("at destination", mk(1,2, 4,4, MODE_TRAV, HAND_RIGHT, 3, 4,4, DIR_E, 0), DIR_N, 4,4,
        4'b0100, HAND_RIGHT, DIR_S, MODE_NORMAL, 0,0,0);
    // an empty lane raises no event
    f = '0;
    fin = f; link_ok = 4'b0000; #1;
    check(!ev_enter && !ev_exit && !ev_unreach && !fout.valid, "empty lane");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
