// End-to-end testbench of manycore_top at its default sizes (8x8 mesh, full-size NI).
//
// The network interface has its outgoing link looped back into its own incoming link
// (credits included), and a kernel model sends 128-word messages to itself: one looked
// up before it arrives (miss, then interrupt, then hit), one control packet, and then
// ten messages in a row: the eight-slot receive buffer fills, the link stalls, and the
// kernel model reads the oldest message whenever its send has stalled for a while. The
// first 128-word send must take one cycle per word plus one for the size flit. At the same time every mesh node sends random
// single-flit messages, first with all links healthy, then with a wall of broken links,
// then with one node cut off. A breadth-first search in the testbench decides which
// flits must arrive and which must return to their source as unreachable. Each
// mechanism of both parts (lookup miss and hit, interrupt, control FIFO, slot and
// credit stalls, deflection, side buffer, dual ejection, traversal entry and exit,
// unreachable detection, steering off a broken link) is counted and must occur.
module tb_manycore_top;
  import maze_pkg::*;
  import tra_ni_pkg::seg_hdr_t;
  import tra_ni_pkg::lookup_status_t;
  localparam int MX = 8, MY = 8, N = MX * MY;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ni_send, ni_send_available, ni_lookup, ni_read_available, ni_read, ni_interrupt;
  tra_ni_pkg::flit_t ni_data_in, ni_data_out, ni_tx_flit;
  logic ni_tx_valid, ni_rx_credit;

  logic [MY*(MX-1)-1:0] hb = '0;
  logic [(MY-1)*MX-1:0] vb = '0;
  logic       inj_valid [N];
  flit_t      inj_flit  [N];
  logic       inj_ready [N];
  logic [1:0] ej_valid  [N];
  flit_t      ej_flit   [N][2];
  router_ev_t ev        [N];

  manycore_top dut (
    .clk, .rst_n,
    .ni_send, .ni_data_in, .ni_send_available, .ni_lookup, .ni_data_out,
    .ni_read_available, .ni_read, .ni_interrupt,
    .ni_tx_valid, .ni_tx_flit, .ni_tx_credit(ni_rx_credit),
    .ni_rx_valid(ni_tx_valid), .ni_rx_flit(ni_tx_flit), .ni_rx_credit,
    .hlink_broken(hb), .vlink_broken(vb),
    .inj_valid, .inj_flit, .inj_ready, .ej_valid, .ej_flit, .ev
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ================================================================ network interface
  int n_miss = 0, n_hit = 0, n_irq = 0, n_ctrl = 0, n_slot_stall = 0, n_credit_stall = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ni.u_depack.state == 3'd2 && !dut.u_ni.u_depack.in_empty &&
        !dut.u_ni.u_depack.seg_ok) n_slot_stall++;
    if (!dut.u_ni.u_link_tx.fifo_empty && dut.u_ni.u_link_tx.credits == 0) n_credit_stall++;
  end

  function automatic tra_ni_pkg::flit_t word_of(int msg, int k);
    return tra_ni_pkg::flit_t'((msg << 16) ^ (k * 32'h9e37) ^ 32'h3c3c0000);
  endfunction
  function automatic seg_hdr_t hdr(bit ctrl, int app, int src, int dst);
    seg_hdr_t h;
    h = '0; h.ctrl = ctrl; h.key.app = 8'(app); h.key.src_task = 8'(src); h.key.dst_task = 8'(dst);
    return h;
  endfunction

  // One kernel drives the port, so while a send is stalled for long (receive buffer
  // full) it may read the oldest buffered message of the ten-message test instead.
  int next_read = 0;
  task automatic k_send(seg_hdr_t h, int len, int msg, bit drain = 1'b0);
    tra_ni_pkg::flit_t w;
    for (int k = -2; k < len; k++) begin
      int stall = 0;
      if (k == -2)      w = tra_ni_pkg::flit_t'({16'(len), 16'h0});
      else if (k == -1) w = tra_ni_pkg::flit_t'(h);
      else              w = word_of(msg, k);
      @(negedge clk);
      while (!ni_send_available) begin
        ni_send = 1'b0;
        stall++;
        if (drain && stall > 100 && next_read < msg - 10) begin
          read_next();
          stall = 0;
        end
        @(negedge clk);
      end
      ni_send = 1'b1; ni_data_in = w;
      @(posedge clk);
    end
    @(negedge clk); ni_send = 1'b0;
  endtask

  task automatic read_next();
    tra_ni_pkg::flit_t words[$];
    lookup_status_t st;
    k_lookup(hdr(0, 2, next_read, 0), st, words);
    while (!st.hit) begin
      while (!ni_interrupt) @(negedge clk);
      k_lookup(hdr(0, 2, next_read, 0), st, words);
    end
    check_words(words, 10 + next_read, 128, 0, $sformatf("NI: buffered message %0d intact", next_read));
    next_read++;
  endtask

  task automatic k_lookup(seg_hdr_t h, output lookup_status_t st, ref tra_ni_pkg::flit_t words[$]);
    words.delete();
    @(negedge clk); ni_lookup = 1'b1; ni_data_in = tra_ni_pkg::flit_t'(h);
    @(negedge clk); ni_lookup = 1'b0;
    while (!ni_read_available) @(negedge clk);
    st = lookup_status_t'(ni_data_out);
    ni_read = 1'b1;
    if (st.hit) begin
      int total = st.ctrl ? int'(st.len) + 1 : int'(st.len);
      for (int k = 0; k < total; k++) begin
        @(negedge clk);
        words.push_back(ni_data_out);
      end
    end
    @(negedge clk); ni_read = 1'b0;
    if (st.hit) n_hit++; else n_miss++;
  endtask

  task automatic check_words(tra_ni_pkg::flit_t words[$], int msg, int len, int skip, string what);
    bit ok = (words.size() == len + skip);
    for (int k = 0; k < len && k + skip < words.size(); k++)
      if (words[k + skip] != word_of(msg, k)) ok = 0;
    check(ok, what);
  endtask

  task automatic ni_test();
    tra_ni_pkg::flit_t words[$];
    lookup_status_t st;
    k_lookup(hdr(0, 1, 2, 3), st, words);
    check(!st.hit, "NI: early lookup misses");
    begin
      int t0 = cyc;
      k_send(hdr(0, 1, 2, 3), 128, 1);
      check(cyc - t0 <= 130 + 1 + 2, $sformatf("NI: 128-word send took %0d cycles", cyc - t0));
      $display("NI: 128-word message sent in %0d cycles", cyc - t0);
    end
    while (!ni_interrupt) @(negedge clk);
    n_irq++;
    k_lookup(hdr(0, 1, 2, 3), st, words);
    check(st.hit && st.len == 128, "NI: hit after interrupt");
    check_words(words, 1, 128, 0, "NI: 128-word message intact");
    k_send(hdr(1, 0, 0, 0), 8, 2);
    while (!ni_interrupt) @(negedge clk);
    k_lookup(hdr(1, 0, 0, 0), st, words);
    check(st.hit && st.ctrl, "NI: control packet");
    if (st.hit && st.ctrl) n_ctrl++;
    check_words(words, 2, 8, 1, "NI: control packet intact");
    for (int m = 0; m < 10; m++) k_send(hdr(0, 2, m, 0), 128, 10 + m, 1'b1);
    while (next_read < 10) read_next();
    $display("NI: done at cycle %0d", cyc);
  endtask

  // ================================================================ maze mesh
  localparam int MAXID = 8192;
  int  exp_node [MAXID];
  bit  exp_unr  [MAXID];
  bit  got      [MAXID];
  int  next_id = 0, outstanding = 0;
  int  q_dst [N][$];
  int  q_id  [N][$];
  int  n_deflect = 0, n_bej = 0, n_binj = 0, n_dual = 0, n_enter = 0, n_exit = 0,
       n_unr = 0, n_steer = 0, n_unr_arrive = 0;

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
    for (int d = 0; d < 4; d++) if (link_ok(n % MX, n / MX, d)) return 0;
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
        q_dst[s].push_back(t); q_id[s].push_back(next_id);
        next_id++; outstanding++;
      end
    end
  endtask

  always @(negedge clk) begin
    for (int n = 0; n < N; n++) begin
      inj_valid[n] <= (q_id[n].size() > 0);
      if (q_id[n].size() > 0) begin
        flit_t f;
        f = '0;
        f.dst_x = coord_t'(q_dst[n][0] % MX);
        f.dst_y = coord_t'(q_dst[n][0] / MX);
        f.payload = 32'(q_id[n][0]);
        inj_flit[n] <= f;
      end else inj_flit[n] <= '0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      if (inj_valid[n] && inj_ready[n] && q_id[n].size() > 0) begin
        void'(q_id[n].pop_front()); void'(q_dst[n].pop_front());
      end
      for (int e = 0; e < 2; e++) if (ej_valid[n][e]) begin
        int id;
        id = int'(ej_flit[n][e].payload);
        if (id >= next_id || got[id]) check(0, $sformatf("mesh: stray flit %0d at %0d", id, n));
        else begin
          got[id] = 1; outstanding--;
          check(n == exp_node[id] && ej_flit[n][e].unreach == exp_unr[id],
                $sformatf("mesh: flit %0d at node %0d (expected %0d, unreachable %0d)", id, n, exp_node[id], exp_unr[id]));
          if (ej_flit[n][e].unreach) n_unr_arrive++;
        end
      end
      n_deflect += int'(ev[n].deflect);   n_bej   += int'(ev[n].buf_eject);
      n_binj    += int'(ev[n].buf_inject); n_dual  += int'(ev[n].dual_eject);
      n_enter   += int'(ev[n].trav_enter); n_exit  += int'(ev[n].trav_exit);
      n_unr     += int'(ev[n].unreach);    n_steer += int'(ev[n].fault_steer);
    end
  end

  task automatic drain(string phase);
    int t0 = cyc;
    while (outstanding > 0 && cyc - t0 < 20000) @(posedge clk);
    check(outstanding == 0, $sformatf("%s: %0d flits not delivered", phase, outstanding));
    $display("%s: done at cycle %0d after %0d cycles", phase, cyc, cyc - t0);
    outstanding = 0;
  endtask

  task automatic mesh_test();
    queue_traffic(10);
    drain("mesh healthy");
    for (int y = 1; y < MY-1; y++) hb[y*(MX-1) + 3] = 1'b1;
    for (int x = 0; x < 3; x++) vb[3*MX + x] = 1'b1;
    repeat (2) @(posedge clk);
    queue_traffic(10);
    drain("mesh with walls");
    hb[5*(MX-1) + 5] = 1'b1; hb[5*(MX-1) + 6] = 1'b1;
    vb[4*MX + 6] = 1'b1; vb[5*MX + 6] = 1'b1;
    repeat (2) @(posedge clk);
    queue_traffic(10);
    drain("mesh with an isolated node");
  endtask

  initial begin
    ni_send = 0; ni_lookup = 0; ni_read = 0; ni_data_in = '0;
    for (int n = 0; n < N; n++) begin inj_valid[n] = 0; inj_flit[n] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    fork
      ni_test();
      mesh_test();
    join
    $display("NI: miss=%0d hit=%0d irq=%0d ctrl=%0d slot_stall=%0d credit_stall=%0d",
             n_miss, n_hit, n_irq, n_ctrl, n_slot_stall, n_credit_stall);
    $display("mesh: flits=%0d deflect=%0d buf_eject=%0d buf_inject=%0d dual_eject=%0d trav_enter=%0d trav_exit=%0d unreach=%0d returned=%0d steer=%0d",
             next_id, n_deflect, n_bej, n_binj, n_dual, n_enter, n_exit, n_unr, n_unr_arrive, n_steer);
    check(n_miss > 0,         "NI lookup miss never happened");
    check(n_hit > 0,          "NI lookup hit never happened");
    check(n_irq > 0,          "NI interrupt never happened");
    check(n_ctrl > 0,         "NI control packet never happened");
    check(n_slot_stall > 0,   "NI full-buffer stall never happened");
    check(n_credit_stall > 0, "NI credit stall never happened");
    check(n_deflect > 0,      "mesh deflection never happened");
    check(n_bej > 0,          "mesh side-buffer eject never happened");
    check(n_binj > 0,         "mesh side-buffer inject never happened");
    check(n_dual > 0,         "mesh dual ejection never happened");
    check(n_enter > 0,        "mesh traversal entry never happened");
    check(n_exit > 0,         "mesh traversal exit never happened");
    check(n_unr > 0,          "mesh unreachable detection never happened");
    check(n_unr_arrive > 0,   "mesh unreachable return never happened");
    check(n_steer > 0,        "mesh steering off a broken link never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
