// Self-checking testbench of maze_deflect, the output stage that steers flits off broken
// links and resets the routing state of deflected flits.
//
// Random sets of up to four flits (never more than there are healthy links, as the
// router guarantees) with random wanted directions and random broken links are applied.
// Checked on every set: each input flit leaves on exactly one port; no flit leaves on a
// broken link; a flit on a healthy port stays there; a flit that leaves on a port other
// than the one it wanted is in normal mode, while one that got its port keeps its mode;
// the silver mark is cleared; and the two event outputs say whether any flit was
// deflected or steered.
module tb_maze_deflect;
  import maze_pkg::*;
  flit_t      fin [4], fout [4];
  logic [3:0] link_ok;
  logic       ev_deflect, ev_steer;

  maze_deflect dut (.fin, .link_ok, .fout, .ev_deflect, .ev_steer);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clk = 0;
  always #5 clk = ~clk;
  int n_steer = 0, n_deflect = 0;

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int healthy, nflits, seen [4];
      bit exp_steer, exp_defl;
      link_ok = 4'($urandom_range(15));
      healthy = $countones(link_ok);
      nflits  = 0;
      for (int d = 0; d < 4; d++) begin
        fin[d] = '0;
        if (nflits < healthy && $urandom_range(2) != 0) begin
          fin[d].valid   = 1;
          fin[d].want    = dir_t'($urandom_range(3));
          fin[d].mode    = mode_t'($urandom_range(1));
          fin[d].silver  = $urandom_range(1);
          fin[d].payload = 32'(100 + d);
          nflits++;
        end
      end
      #1;
      exp_steer = 0;
      for (int d = 0; d < 4; d++) begin
        seen[d] = 0;
        if (fin[d].valid && !link_ok[d]) exp_steer = 1;
      end
      exp_defl = 0;
      for (int o = 0; o < 4; o++) if (fout[o].valid) begin
        int id;
        id = int'(fout[o].payload) - 100;
        check(id >= 0 && id < 4 && fin[id].valid, $sformatf("set %0d: unknown flit on %0d", t, o));
        if (id >= 0 && id < 4) begin
          seen[id]++;
          check(link_ok[o], $sformatf("set %0d: flit on broken link %0d", t, o));
          if (link_ok[id]) check(o == id, $sformatf("set %0d: flit on healthy port %0d moved", t, id));
          if (fout[o].want != dir_t'(o)) begin
            exp_defl = 1;
            check(fout[o].mode == MODE_NORMAL, $sformatf("set %0d: deflected flit not reset", t));
          end else
            check(fout[o].mode == fin[id].mode, $sformatf("set %0d: mode changed", t));
          check(!fout[o].silver, $sformatf("set %0d: silver kept", t));
        end
      end
      for (int d = 0; d < 4; d++)
        if (fin[d].valid) check(seen[d] == 1, $sformatf("set %0d: flit %0d left %0d times", t, d, seen[d]));
      check(ev_steer == exp_steer && ev_deflect == exp_defl, $sformatf("set %0d: events", t));
      n_steer += int'(exp_steer); n_deflect += int'(exp_defl);
      #4;
    end
    $display("steered sets=%0d deflected sets=%0d", n_steer, n_deflect);
    check(n_steer > 0 && n_deflect > 0, "both mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
