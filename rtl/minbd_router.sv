// minBD-style bufferless deflection router with maze routing.
//
// Every flit travels on its own; the router never stalls a flit on a link. Two stages,
// each ending in a register, so a flit spends two cycles per hop:
//  stage 1: Eject (a flit for this node leaves to the PE), Buffer Inject (the oldest
//           side-buffer flit re-enters an empty lane), a second Eject, Inject (a new flit
//           from the PE enters an empty lane), then one maze-routing unit (MR) per lane
//           decides the wanted output and updates the maze-routing header.
//  stage 2: Silver Flit (one flit, chosen round robin, gets priority), a two-stage
//           permutation network of 2x2 blocks that gives every flit an output, Buffer
//           Eject (one deflected flit per cycle goes to the side buffer instead), and the
//           Deflection stage (maze state reset for deflected flits, steering away from
//           broken links). The result is registered on the output links.
// Lanes are indexed by port (N, E, S, W); a flit arriving on port p sits in lane p.
// A flit is injected (from the PE or the side buffer) only into an empty lane and only
// while the router holds fewer flits than it has healthy links, so every flit always
// has a healthy output. link_ok says which of the router's own links work; that is all
// the fault knowledge maze routing needs. Inputs on broken links are ignored.
// The stage order and names follow the router diagram of the design; the silver-flit
// choice, the side-buffer policy and the ejection of up to two flits per cycle are this
// implementation's reading of that diagram.
module minbd_router
  import maze_pkg::*;
#(
  parameter int unsigned X          = 0,
  parameter int unsigned Y          = 0,
  parameter int unsigned SIDE_DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] link_ok,
  input  flit_t      in_flit  [4],
  output flit_t      out_flit [4],
  // local PE
  input  logic       inj_valid,
  input  flit_t      inj_flit,
  output logic       inj_ready,
  output logic [1:0] ej_valid,
  output flit_t      ej_flit  [2],
  output router_ev_t ev
);
  localparam coord_t CX = coord_t'(X);
  localparam coord_t CY = coord_t'(Y);

  // side buffer
  logic  sb_push, sb_pop, sb_full, sb_empty;
  flit_t sb_din, sb_dout;

  sync_fifo #(.T(flit_t), .DEPTH(SIDE_DEPTH)) u_side_buffer (
    .clk, .rst_n, .push(sb_push), .din(sb_din), .pop(sb_pop), .dout(sb_dout),
    .full(sb_full), .empty(sb_empty), .count()
  );

  function automatic logic [2:0] count_valid(flit_t f [4]);
    logic [2:0] c;
    c = '0;
    for (int i = 0; i < 4; i++) c = c + {2'b0, f[i].valid};
    return c;
  endfunction

  logic [2:0] healthy;
  always_comb begin
    healthy = '0;
    for (int i = 0; i < 4; i++) healthy = healthy + {2'b0, link_ok[i]};
  end

  // ------------------------------------------------------------------ stage 1
  flit_t l0 [4], l1 [4], l2 [4], l3 [4], l4 [4], mr [4];
  logic  ej0_v, ej1_v, bi_v, inj_go;
  flit_t ej0_f, ej1_f;
  logic  hand_q;
  logic [3:0] mr_enter, mr_exit, mr_unreach;

  always_comb begin
    // inputs on broken links carry nothing
    for (int i = 0; i < 4; i++) l0[i] = link_ok[i] ? in_flit[i] : '0;

    // Eject
    l1 = l0; ej0_v = 1'b0; ej0_f = '0;
    for (int i = 0; i < 4; i++)
      if (!ej0_v && l0[i].valid && l0[i].dst_x == CX && l0[i].dst_y == CY) begin
        ej0_v = 1'b1; ej0_f = l0[i]; l1[i] = '0;
      end

    // Buffer Inject
    l2 = l1; bi_v = 1'b0;
    if (!sb_empty && count_valid(l1) < healthy)
      for (int i = 0; i < 4; i++)
        if (!bi_v && !l1[i].valid) begin
          bi_v = 1'b1; l2[i] = sb_dout;
        end

    // second Eject
    l3 = l2; ej1_v = 1'b0; ej1_f = '0;
    for (int i = 0; i < 4; i++)
      if (!ej1_v && l2[i].valid && l2[i].dst_x == CX && l2[i].dst_y == CY) begin
        ej1_v = 1'b1; ej1_f = l2[i]; l3[i] = '0;
      end

    // Inject
    l4 = l3; inj_ready = 1'b0;
    if (count_valid(l3) < healthy)
      for (int i = 0; i < 4; i++)
        if (!inj_ready && !l3[i].valid) begin
          inj_ready = 1'b1;
          if (inj_valid) begin
            l4[i]        = inj_flit;
            l4[i].valid  = 1'b1;
            l4[i].mode   = MODE_NORMAL;
            l4[i].src_x  = CX;
            l4[i].src_y  = CY;
          end
        end
    inj_go = inj_valid && inj_ready;
  end
  assign sb_pop = bi_v;

  for (genvar i = 0; i < 4; i++) begin : g_mr
    maze_route u_mr (
      .fin(l4[i]), .lane(dir_t'(i)), .cur_x(CX), .cur_y(CY), .link_ok,
      .hand_sel(hand_t'(hand_q ^ i[0])), .fout(mr[i]),
      .ev_enter(mr_enter[i]), .ev_exit(mr_exit[i]), .ev_unreach(mr_unreach[i])
    );
  end

  // pipeline register between the stages
  flit_t p [4];
  logic [1:0] sptr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) p[i] <= '0;
      hand_q   <= 1'b0;
      ej_valid <= '0;
      ej_flit[0] <= '0;
      ej_flit[1] <= '0;
    end else begin
      p          <= mr;
      hand_q     <= ~hand_q;
      ej_valid   <= {ej1_v, ej0_v};
      ej_flit[0] <= ej0_f;
      ej_flit[1] <= ej1_f;
    end
  end

  // ------------------------------------------------------------------ stage 2
  flit_t s [4], a0 [2], a1 [2], q [4], be [4], r [4];
  logic  sv_found;
  always_comb begin
    // Silver Flit: first valid lane at or after the round-robin pointer
    s = p; sv_found = 1'b0;
    for (int k = 0; k < 4; k++) begin
      if (!sv_found && p[2'(sptr + 2'(k))].valid) begin
        s[2'(sptr + 2'(k))].silver = 1'b1; sv_found = 1'b1;
      end
    end
  end

  bd_perm_block #(.STAGE(0)) u_pa0 (.a(s[DIR_N]), .b(s[DIR_E]), .o0(a0[0]), .o1(a0[1]));
  bd_perm_block #(.STAGE(0)) u_pa1 (.a(s[DIR_S]), .b(s[DIR_W]), .o0(a1[0]), .o1(a1[1]));
  bd_perm_block #(.STAGE(1)) u_pb0 (.a(a0[0]), .b(a1[0]), .o0(q[DIR_N]), .o1(q[DIR_E]));
  bd_perm_block #(.STAGE(1)) u_pb1 (.a(a0[1]), .b(a1[1]), .o0(q[DIR_S]), .o1(q[DIR_W]));

  // Buffer Eject: one deflected flit per cycle leaves the pipeline into the side buffer
  always_comb begin
    be = q; sb_push = 1'b0; sb_din = '0;
    for (int d = 0; d < 4; d++)
      if (!sb_push && !sb_full && q[d].valid && (q[d].want != dir_t'(d) || !link_ok[d])) begin
        sb_push       = 1'b1;
        sb_din        = q[d];
        sb_din.mode   = MODE_NORMAL;
        sb_din.silver = 1'b0;
        be[d]         = '0;
      end
  end

  logic ev_deflect, ev_steer;
  maze_deflect u_deflect (.fin(be), .link_ok, .fout(r), .ev_deflect, .ev_steer);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) out_flit[i] <= '0;
      sptr <= '0;
    end else begin
      for (int i = 0; i < 4; i++) out_flit[i] <= link_ok[i] ? r[i] : '0;
      sptr <= sptr + 1'b1;
    end
  end

  always_comb begin
    ev            = '0;
    ev.deflect    = ev_deflect;
    ev.buf_eject  = sb_push;
    ev.buf_inject = bi_v;
    ev.inject     = inj_go;
    ev.dual_eject = ej0_v && ej1_v;
    ev.trav_enter = |mr_enter;
    ev.trav_exit  = |mr_exit;
    ev.unreach    = |mr_unreach;
    ev.fault_steer = ev_steer;
  end

  // No flit may be lost: every flit of stage 2 leaves on a healthy link or to the buffer.
  a_conserve: assert property (@(posedge clk) disable iff (!rst_n)
    count_valid(p) == count_valid(r) + {2'b0, sb_push});
endmodule
