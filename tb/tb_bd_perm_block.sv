// Self-checking testbench of bd_perm_block, the 2x2 arbiter block of the permutation
// network.
//
// Both stages are instantiated (stage 0 steers by the upper bit of the wanted direction,
// stage 1 by the lower bit). Random pairs of flits, some empty and some marked silver,
// are applied; the expected outputs follow the rule: the silver flit wins, otherwise
// input a; the winner goes to the output its bit asks for and the other flit takes the
// remaining output. Both flits always leave (nothing is dropped or duplicated). A few
// directed cases are listed first.
module tb_bd_perm_block;
  import maze_pkg::*;
  flit_t a, b, o0 [2], o1 [2];

  bd_perm_block #(.STAGE(0)) u_s0 (.a, .b, .o0(o0[0]), .o1(o1[0]));
  bd_perm_block #(.STAGE(1)) u_s1 (.a, .b, .o0(o0[1]), .o1(o1[1]));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clk = 0;
  always #5 clk = ~clk;

  function automatic flit_t mk(bit v, dir_t w, bit s, int id);
    flit_t f;
    f = '0;
    if (v) begin f.valid = 1; f.want = w; f.silver = s; f.payload = 32'(id); end
    return f;
  endfunction

  task automatic expect_out(int st, flit_t e0, flit_t e1, string what);
    check(o0[st] == e0 && o1[st] == e1, $sformatf("stage %0d %s", st, what));
  endtask

  initial begin
    // directed: stage 0 separates N/E (bit1 = 0) from S/W (bit1 = 1)
    a = mk(1, DIR_S, 0, 1); b = mk(1, DIR_N, 0, 2); #1;
    expect_out(0, b, a, "no conflict");
    a = mk(1, DIR_S, 0, 1); b = mk(1, DIR_W, 0, 2); #1;
    expect_out(0, b, a, "conflict, a wins");
    a = mk(1, DIR_S, 0, 1); b = mk(1, DIR_W, 1, 2); #1;
    expect_out(0, a, b, "conflict, silver b wins");
    a = '0; b = mk(1, DIR_E, 0, 2); #1;
    expect_out(0, b, a, "only b");
    // stage 1 separates N/S (bit0 = 0) from E/W (bit0 = 1)
    a = mk(1, DIR_E, 0, 1); b = mk(1, DIR_W, 0, 2); #1;
    expect_out(1, b, a, "conflict, a wins");
    a = mk(1, DIR_N, 0, 1); b = mk(1, DIR_W, 0, 2); #1;
    expect_out(1, a, b, "no conflict");
    // random
    for (int t = 0; t < 2000; t++) begin
      a = mk($urandom_range(3) != 0, dir_t'($urandom_range(3)), $urandom_range(3) == 0, 2*t);
      b = mk($urandom_range(3) != 0, dir_t'($urandom_range(3)), $urandom_range(3) == 0, 2*t+1);
      if (a.silver && b.silver) b.silver = 0;
      #1;
      for (int st = 0; st < 2; st++) begin
        flit_t w, l;
        bit    bitw;
        if (a.valid && b.valid) begin
          if (b.silver && !a.silver) begin w = b; l = a; end else begin w = a; l = b; end
        end else if (a.valid) begin w = a; l = b; end
        else                  begin w = b; l = a; end
        bitw = (st == 0) ? w.want[1] : w.want[0];
        if (bitw) expect_out(st, l, w, $sformatf("random %0d", t));
        else      expect_out(st, w, l, $sformatf("random %0d", t));
      end
      #4;
    end
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
