// Self-checking testbench of minbd_router, one bufferless deflection router with maze
// routing, placed at (2,2).
//
// Directed cases: a flit crossing the router takes exactly two cycles from input link
// to output link (the two-stage pipeline), and leaves on the productive output; a flit
// for this node is ejected; two flits for this node in one cycle are both ejected in
// that cycle; a PE flit is injected and leaves towards its destination; with every
// healthy link carrying an incoming flit the PE is not allowed to inject. Then a random
// run: every cycle each healthy input link may carry a flit (random destination, never
// more than the healthy links) and the PE injects when allowed. Every flit is followed
// by its id: each must leave exactly once, either on a healthy output link or to the
// PE if addressed to this node, and the router must empty at the end. The random run
// also requires deflections and side-buffer use to happen.
module tb_minbd_router;
  import maze_pkg::*;
  localparam int RX = 2, RY = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] link_ok;
  flit_t      in_flit [4], out_flit [4], inj_flit, ej_flit [2];
  logic       inj_valid, inj_ready;
  logic [1:0] ej_valid;
  router_ev_t ev;

  minbd_router #(.X(RX), .Y(RY)) dut (.clk, .rst_n, .link_ok, .in_flit, .out_flit, .inj_valid,
                                      .inj_flit, .inj_ready, .ej_valid, .ej_flit, .ev);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  localparam int MAXID = 20000;
  int  left_at [MAXID];          // -1: not sent; 0: in the router; 1: left
  int  out_port [MAXID], out_cyc [MAXID];
  int  n_out = 0, n_ej = 0, n_dual = 0, n_defl = 0, n_bej = 0, n_binj = 0;

  function automatic flit_t mk(int id, int dx, int dy);
    flit_t f;
    f = '0;
    f.valid = 1; f.dst_x = coord_t'(dx); f.dst_y = coord_t'(dy);
    f.src_x = coord_t'(RX); f.src_y = coord_t'(RY); f.payload = 32'(id);
    return f;
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < 4; o++) if (out_flit[o].valid) begin
      int id;
      id = int'(out_flit[o].payload);
      check(link_ok[o], $sformatf("flit %0d on broken link %0d", id, o));
      check(left_at[id] == 0, $sformatf("flit %0d left twice or was never sent", id));
      left_at[id] = 1; out_port[id] = o; out_cyc[id] = cyc; n_out++;
    end
    for (int e = 0; e < 2; e++) if (ej_valid[e]) begin
      int id;
      id = int'(ej_flit[e].payload);
      check(ej_flit[e].dst_x == RX && ej_flit[e].dst_y == RY, $sformatf("flit %0d ejected here", id));
      check(left_at[id] == 0, $sformatf("flit %0d ejected twice or never sent", id));
      left_at[id] = 1; out_port[id] = 4; out_cyc[id] = cyc; n_ej++;
    end
    if (ej_valid == 2'b11) n_dual++;
    n_defl += int'(ev.deflect); n_bej += int'(ev.buf_eject); n_binj += int'(ev.buf_inject);
  end

  int next_id = 1;
  // drive one cycle of input flits: ids are registered as sent
  task automatic drive(flit_t f [4], bit iv, flit_t fi);
    @(negedge clk);
    for (int p = 0; p < 4; p++) begin
      in_flit[p] = f[p];
      if (f[p].valid) left_at[int'(f[p].payload)] = 0;
    end
    inj_valid = iv; inj_flit = fi;
    @(posedge clk);
    if (iv && inj_ready) left_at[int'(fi.payload)] = 0;
    #1;
    for (int p = 0; p < 4; p++) in_flit[p] = '0;
    inj_valid = 0;
  endtask

  task automatic idle(int n);
    repeat (n) @(posedge clk);
  endtask

  initial begin
    flit_t f [4], none [4];
    int c0;
    foreach (left_at[i]) left_at[i] = -1;
    for (int p = 0; p < 4; p++) begin in_flit[p] = '0; none[p] = '0; end
    inj_valid = 0; inj_flit = '0; link_ok = 4'b1111;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // 1. pass-through from W to E: two cycles
    f = none; f[DIR_W] = mk(1, 5, 2);
    drive(f, 0, '0); c0 = cyc - 1;
    idle(4);
    check(left_at[1] == 1 && out_port[1] == DIR_E, "pass-through leaves east");
    check(out_cyc[1] - c0 == 2, $sformatf("hop takes %0d cycles, expected 2", out_cyc[1] - c0));
    // 2. ejection
    f = none; f[DIR_N] = mk(2, RX, RY);
    drive(f, 0, '0); idle(4);
    check(left_at[2] == 1 && out_port[2] == 4, "flit for this node ejected");
    // 3. two flits for this node in one cycle
    f = none; f[DIR_N] = mk(3, RX, RY); f[DIR_S] = mk(4, RX, RY);
    drive(f, 0, '0); idle(4);
    check(left_at[3] == 1 && left_at[4] == 1 && out_cyc[3] == out_cyc[4] && n_dual == 1,
          "two flits ejected in one cycle");
    // 4. injection
    drive(none, 1, mk(5, 2, 6)); idle(4);
    check(left_at[5] == 1 && out_port[5] == DIR_N, "injected flit leaves north");
    // 5. no injection while every healthy link brings a flit
    next_id = 10;
    for (int k = 0; k < 6; k++) begin
      for (int p = 0; p < 4; p++) f[p] = mk(next_id++, (p == DIR_W) ? 7 : 0, (p == DIR_S) ? 7 : 0);
      @(negedge clk);
      for (int p = 0; p < 4; p++) begin in_flit[p] = f[p]; left_at[int'(f[p].payload)] = 0; end
      inj_valid = 1; inj_flit = mk(9, 0, 0);
      @(posedge clk);
      if (k >= 1) check(!inj_ready, "no injection into a full router");
    end
    @(negedge clk);
    for (int p = 0; p < 4; p++) in_flit[p] = '0;
    inj_valid = 0;
    idle(8);
    check(left_at[9] == -1, "PE flit held back");
    // 6. random run, with some broken links
    next_id = 100;
    for (int t = 0; t < 4000; t++) begin
      int k;
      if (t % 500 == 0) begin
        @(negedge clk);
        for (int p = 0; p < 4; p++) in_flit[p] = '0;
        inj_valid = 0;
        idle(12);
        link_ok = (t < 1000) ? 4'b1111 : 4'($urandom_range(1, 15));                    // links change only while the router is quiet
      end
      k = 0;
      for (int p = 0; p < 4; p++) begin
        f[p] = '0;
        if (link_ok[p] && $urandom_range(99) < 60) begin
          f[p] = mk(next_id++, $urandom_range(4), $urandom_range(4));
          k++;
        end
      end
      @(negedge clk);
      for (int p = 0; p < 4; p++) begin
        in_flit[p] = f[p];
        if (f[p].valid) left_at[int'(f[p].payload)] = 0;
      end
      inj_valid = 1; inj_flit = mk(next_id, $urandom_range(4), $urandom_range(4));
      @(posedge clk);
      if (inj_ready) begin left_at[next_id] = 0; next_id++; end
    end
    @(negedge clk);
    for (int p = 0; p < 4; p++) in_flit[p] = '0;
    inj_valid = 0;
    idle(40);
    begin
      int lost = 0;
      for (int i = 1; i < next_id; i++) if (left_at[i] == 0) lost++;
      check(lost == 0, $sformatf("%0d flits still inside", lost));
    end
    $display("flits=%0d out=%0d ejected=%0d dual=%0d deflect=%0d buf_eject=%0d buf_inject=%0d",
             next_id, n_out, n_ej, n_dual, n_defl, n_bej, n_binj);
    check(n_defl > 0 && n_bej > 0 && n_binj > 0, "deflection and side buffer used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
