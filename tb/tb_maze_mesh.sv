// Self-checking testbench of the maze-routing mesh (8x8 by default).
//
// Three phases, each injecting random single-flit messages from every node and draining
// the network before the next: (1) no faults; (2) a broken wall of links with gaps, so
// flits must leave normal mode and walk around it; (3) one node cut off completely, so
// flits addressed to it must come back to their source marked unreachable. A breadth
// first search over the healthy links, done here and independent of the routers, says
// for every flit whether it must arrive or come back. Each flit must appear exactly once,
// at the right node, with its payload intact. The minimum latency of a one-hop flit is
// checked against the two cycles per hop plus ejection. The events of all routers are
// counted and each mechanism must have happened at least once.
module tb_maze_mesh;
  import maze_pkg::*;
  localparam int MX = 8, MY = 8, N = MX * MY;
  localparam int PER_NODE = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [MY*(MX-1)-1:0] hb = '0;
  logic [(MY-1)*MX-1:0] vb = '0;
  logic       inj_valid [N];
  flit_t      inj_flit  [N];
  logic       inj_ready [N];
  logic [1:0] ej_valid  [N];
  flit_t      ej_flit   [N][2];
  router_ev_t ev        [N];

  maze_mesh #(.MESH_X(MX), .MESH_Y(MY)) dut (
    .clk, .rst_n, .hlink_broken(hb), .vlink_broken(vb),
    .inj_valid, .inj_flit, .inj_ready, .ej_valid, .ej_flit, .ev
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- bookkeeping of flits in flight
  localparam int MAXID = 4096;
  int  exp_node [MAXID];
  bit  exp_unr  [MAXID];
  bit  got      [MAXID];
  int  sent_cyc [MAXID];
  int  next_id = 0, outstanding = 0, cyc = 0;
  int  q_dst [N][$];
  int  q_id  [N][$];
  int  min_lat1 = 1000;
  int  n_deflect = 0, n_bej = 0, n_binj = 0, n_dual = 0, n_enter = 0, n_exit = 0,
       n_unr = 0, n_steer = 0, n_inj = 0, n_unr_arrive = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // reachability over healthy links
  function automatic bit link_ok(int x, int y, int d);
    case (d)
      0: return (y < MY-1) && !vb[y*MX + x];
      1: return (x < MX-1) && !hb[y*(MX-1) + x];
      2: return (y > 0)    && !vb[(y-1)*MX + x];
      default: return (x > 0) && !hb[y*(MX-1) + x - 1];
    endcase
  endfunction
  function automatic bit reachable(int s, int t);
    bit seen [N];
    int q[$];
    foreach (seen[i]) seen[i] = 0;
    seen[s] = 1; q.push_back(s);
    while (q.size() > 0) begin
      int n, x, y;
      n = q.pop_front(); x = n % MX; y = n / MX;
      if (n == t) return 1;
      for (int d = 0; d < 4; d++) if (link_ok(x, y, d)) begin
        int m;
        m = (d == 0) ? n + MX : (d == 1) ? n + 1 : (d == 2) ? n - MX : n - 1;
        if (!seen[m]) begin seen[m] = 1; q.push_back(m); end
      end
    end
    return 0;
  endfunction

  function automatic bit isolated(int n);
    int x = n % MX, y = n / MX;
    for (int d = 0; d < 4; d++) if (link_ok(x, y, d)) return 0;
    return 1;
  endfunction

  task automatic queue_traffic(int per_node);
    for (int s = 0; s < N; s++) begin
      if (isolated(s)) continue;
      for (int k = 0; k < per_node; k++) begin
        int t;
        do t = $urandom_range(N-1); while (t == s);
        exp_unr[next_id]  = !reachable(s, t);
        exp_node[next_id] = exp_unr[next_id] ? s : t;
        got[next_id]      = 0;
        q_dst[s].push_back(t);
        q_id[s].push_back(next_id);
        next_id++;
        outstanding++;
      end
    end
  endtask

  // drive injection on the negative edge, consume on the positive edge
  always @(negedge clk) begin
    for (int n = 0; n < N; n++) begin
      inj_valid[n] <= (q_id[n].size() > 0);
      if (q_id[n].size() > 0) begin
        flit_t f;
        f = '0;
        f.dst_x   = coord_t'(q_dst[n][0] % MX);
        f.dst_y   = coord_t'(q_dst[n][0] / MX);
        f.payload = 32'(q_id[n][0]);
        inj_flit[n] <= f;
      end else inj_flit[n] <= '0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      if (inj_valid[n] && inj_ready[n] && q_id[n].size() > 0) begin
        sent_cyc[q_id[n][0]] = cyc;
        void'(q_id[n].pop_front());
        void'(q_dst[n].pop_front());
      end
      for (int e = 0; e < 2; e++) if (ej_valid[n][e]) begin
        int id;
        id = int'(ej_flit[n][e].payload);
        if (id >= next_id || got[id]) begin
          check(0, $sformatf("unexpected or duplicate flit %0d at node %0d", id, n));
        end else begin
          got[id] = 1; outstanding--;
          check(n == exp_node[id], $sformatf("flit %0d ejected at %0d, expected %0d", id, n, exp_node[id]));
          check(ej_flit[n][e].unreach == exp_unr[id], $sformatf("flit %0d unreachable flag %0d", id, ej_flit[n][e].unreach));
          if (ej_flit[n][e].unreach) n_unr_arrive++;
        end
      end
      n_deflect += int'(ev[n].deflect);
      n_bej     += int'(ev[n].buf_eject);
      n_binj    += int'(ev[n].buf_inject);
      n_dual    += int'(ev[n].dual_eject);
      n_enter   += int'(ev[n].trav_enter);
      n_exit    += int'(ev[n].trav_exit);
      n_unr     += int'(ev[n].unreach);
      n_steer   += int'(ev[n].fault_steer);
      n_inj     += int'(ev[n].inject);
    end
  end

  task automatic drain(string phase);
    int t0 = cyc;
    while (outstanding > 0 && cyc - t0 < 20000) @(posedge clk);
    check(outstanding == 0, $sformatf("%s: %0d flits not delivered", phase, outstanding));
    $display("%s: drained in %0d cycles", phase, cyc - t0);
    outstanding = 0;
  endtask

  initial begin
    for (int n = 0; n < N; n++) begin inj_valid[n] = 0; inj_flit[n] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // latency of a single one-hop flit: inject at (0,0), eject at (1,0)
    q_dst[0].push_back(1); q_id[0].push_back(next_id);
    exp_node[next_id] = 1; exp_unr[next_id] = 0; got[next_id] = 0; next_id++; outstanding++;
    begin
      int t0;
      @(posedge clk); t0 = cyc;
      while (outstanding > 0) @(posedge clk);
      // one edge until the flit is offered, then inject edge -> stage 2 -> link
      // register -> ejection register: 2 cycles per hop plus 1 for ejection
      check(cyc - t0 == 4, $sformatf("one-hop latency %0d cycles, expected 4", cyc - t0));
    end

    // phase 1: healthy mesh
    queue_traffic(PER_NODE);
    drain("phase 1 (no faults)");

    // phase 2: a vertical wall of broken links between x=3 and x=4, open at y=0 and y=7,
    // and a horizontal one between y=3 and y=4 for x=0..2
    for (int y = 1; y < MY-1; y++) hb[y*(MX-1) + 3] = 1'b1;
    for (int x = 0; x < 3; x++) vb[3*MX + x] = 1'b1;
    repeat (2) @(posedge clk);
    queue_traffic(PER_NODE);
    drain("phase 2 (walls)");

    // phase 3: cut node (6,5) off entirely, plus the walls
    hb[5*(MX-1) + 5] = 1'b1; hb[5*(MX-1) + 6] = 1'b1;
    vb[4*MX + 6] = 1'b1; vb[5*MX + 6] = 1'b1;
    repeat (2) @(posedge clk);
    queue_traffic(PER_NODE);
    for (int s = 0; s < 8; s++) begin   // extra flits straight to the cut-off node
      exp_unr[next_id] = 1; exp_node[next_id] = s; got[next_id] = 0;
      q_dst[s].push_back(5*MX + 6); q_id[s].push_back(next_id); next_id++; outstanding++;
    end
    drain("phase 3 (isolated node)");

    // phase 4: heavy burst on the healthy mesh to exercise deflection and the side buffer
    hb = '0; vb = '0;
    repeat (2) @(posedge clk);
    queue_traffic(40);
    drain("phase 4 (burst)");

    $display("events: deflect=%0d buf_eject=%0d buf_inject=%0d dual_eject=%0d trav_enter=%0d trav_exit=%0d unreach=%0d steer=%0d inject=%0d",
             n_deflect, n_bej, n_binj, n_dual, n_enter, n_exit, n_unr, n_steer, n_inj);
    check(n_deflect > 0,  "no deflection happened");
    check(n_bej > 0,      "no side-buffer eject happened");
    check(n_binj > 0,     "no side-buffer inject happened");
    check(n_dual > 0,     "no dual ejection happened");
    check(n_enter > 0,    "no traversal entry happened");
    check(n_exit > 0,     "no traversal exit happened");
    check(n_unr > 0,      "no unreachable detection happened");
    check(n_unr_arrive > 0, "no unreachable flit returned");
    check(n_inj == next_id, $sformatf("%0d injections for %0d flits", n_inj, next_id));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
