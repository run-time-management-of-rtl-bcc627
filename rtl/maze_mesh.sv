// Mesh network of maze-routing deflection routers.
//
// MESH_X x MESH_Y routers, node n = y*MESH_X + x, x growing to the east and y to the
// north. Neighbouring routers are joined by a pair of opposite one-flit links; a link
// register sits in each router's output, so a hop takes two cycles in total (see
// minbd_router). Links can be declared broken at run time: hlink_broken[y*(MESH_X-1)+x]
// breaks the link between (x,y) and (x+1,y), vlink_broken[y*MESH_X+x] the one between
// (x,y) and (x,y+1). A broken link fails in both directions, and each router learns only
// about its own links, as the design's fully distributed fault model has it. Ports at
// the mesh edge count as broken links. Each node brings out its injection port, its two
// ejection ports and its event flags. The 8x8 default is the network size the design
// was evaluated on.
module maze_mesh
  import maze_pkg::*;
#(
  parameter int unsigned MESH_X     = 8,
  parameter int unsigned MESH_Y     = 8,
  parameter int unsigned SIDE_DEPTH = 4,
  parameter int unsigned NODES      = MESH_X * MESH_Y
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [MESH_Y*(MESH_X-1)-1:0]    hlink_broken,
  input  logic [(MESH_Y-1)*MESH_X-1:0]    vlink_broken,
  input  logic                            inj_valid [NODES],
  input  flit_t                           inj_flit  [NODES],
  output logic                            inj_ready [NODES],
  output logic [1:0]                      ej_valid  [NODES],
  output flit_t                           ej_flit   [NODES][2],
  output router_ev_t                      ev        [NODES]
);
  flit_t out_f [NODES][4];
  flit_t in_f  [NODES][4];
  logic [3:0] ok [NODES];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int N = y * MESH_X + x;

      // link health as seen from this router
      if (y < MESH_Y - 1) begin : g_n
        assign ok[N][DIR_N] = !vlink_broken[y*MESH_X + x];
        assign in_f[N][DIR_N] = out_f[N + MESH_X][DIR_S];
      end else begin : g_nb
        assign ok[N][DIR_N] = 1'b0;
        assign in_f[N][DIR_N] = '0;
      end
      if (y > 0) begin : g_s
        assign ok[N][DIR_S] = !vlink_broken[(y-1)*MESH_X + x];
        assign in_f[N][DIR_S] = out_f[N - MESH_X][DIR_N];
      end else begin : g_sb
        assign ok[N][DIR_S] = 1'b0;
        assign in_f[N][DIR_S] = '0;
      end
      if (x < MESH_X - 1) begin : g_e
        assign ok[N][DIR_E] = !hlink_broken[y*(MESH_X-1) + x];
        assign in_f[N][DIR_E] = out_f[N + 1][DIR_W];
      end else begin : g_eb
        assign ok[N][DIR_E] = 1'b0;
        assign in_f[N][DIR_E] = '0;
      end
      if (x > 0) begin : g_w
        assign ok[N][DIR_W] = !hlink_broken[y*(MESH_X-1) + x - 1];
        assign in_f[N][DIR_W] = out_f[N - 1][DIR_E];
      end else begin : g_wb
        assign ok[N][DIR_W] = 1'b0;
        assign in_f[N][DIR_W] = '0;
      end

      minbd_router #(.X(x), .Y(y), .SIDE_DEPTH(SIDE_DEPTH)) u_router (
        .clk, .rst_n, .link_ok(ok[N]), .in_flit(in_f[N]), .out_flit(out_f[N]),
        .inj_valid(inj_valid[N]), .inj_flit(inj_flit[N]), .inj_ready(inj_ready[N]),
        .ej_valid(ej_valid[N]), .ej_flit(ej_flit[N]), .ev(ev[N])
      );
    end
  end
endmodule
