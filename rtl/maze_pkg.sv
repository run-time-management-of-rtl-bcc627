// Types shared by the maze-routing deflection router and mesh.
//
// Each flit carries, besides its addresses and payload, the four maze-routing header
// fields: the best Manhattan distance reached so far (md_best), the mode (normal or
// traversal), the router where traversal began (ntrav) and the direction first taken
// from it (dir_trav). The hand rule used during traversal is one more bit. Directions
// are numbered clockwise so that "turn right" is +1 modulo 4.
package maze_pkg;

  localparam int unsigned COORD_W   = 4;   // up to 16x16 meshes
  localparam int unsigned MD_W      = COORD_W + 2;
  localparam int unsigned PAYLOAD_W = 32;

  typedef enum logic [1:0] {DIR_N = 2'd0, DIR_E = 2'd1, DIR_S = 2'd2, DIR_W = 2'd3} dir_t;
  typedef enum logic {MODE_NORMAL = 1'b0, MODE_TRAV = 1'b1} mode_t;
  typedef enum logic {HAND_RIGHT = 1'b0, HAND_LEFT = 1'b1} hand_t;

  typedef logic [COORD_W-1:0] coord_t;

  typedef struct packed {
    logic                 valid;
    coord_t               src_x;
    coord_t               src_y;
    coord_t               dst_x;
    coord_t               dst_y;
    mode_t                mode;
    hand_t                hand;
    logic [MD_W-1:0]      md_best;
    coord_t               ntrav_x;
    coord_t               ntrav_y;
    dir_t                 dir_trav;
    logic                 unreach;   // destination found unreachable; flit returns to src
    logic                 silver;    // router-internal: priority flit of this cycle
    dir_t                 want;      // router-internal: output asked for by maze routing
    logic [PAYLOAD_W-1:0] payload;
  } flit_t;

  // Per-cycle events of one router, for observation.
  typedef struct packed {
    logic deflect;       // some flit left on another port than maze routing asked for
    logic buf_eject;     // a deflected flit was moved into the side buffer
    logic buf_inject;    // a flit from the side buffer re-entered the pipeline
    logic inject;        // a local flit was injected
    logic dual_eject;    // two flits were ejected in the same cycle
    logic trav_enter;    // a flit entered traversal mode
    logic trav_exit;     // a flit left traversal mode back to normal mode
    logic unreach;       // a flit found its destination unreachable
    logic fault_steer;   // a flit was steered away from a broken link
  } router_ev_t;

  function automatic dir_t dir_opposite(dir_t d);
    return dir_t'(d + 2'd2);
  endfunction

endpackage
