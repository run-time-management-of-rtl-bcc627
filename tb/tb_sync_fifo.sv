// Self-checking testbench of sync_fifo, the sending FIFO of the network interface.
//
// Pushes and pops random words at random moments and compares every popped word, and the
// full, empty and count outputs, with a queue kept by the testbench. It also checks that
// a word pushed into an empty FIFO is visible at dout in the next cycle (first-word
// fall-through) and that a full FIFO accepts one word per cycle when popped at the same
// time. Depth 16 as in the network interface.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        push, pop, full, empty;
  logic [31:0] din, dout;
  logic [4:0]  count;

  sync_fifo #(.T(logic [31:0]), .DEPTH(16)) dut (
    .clk, .rst_n, .push, .din, .pop, .dout, .full, .empty, .count
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] model[$];
  int pushes = 0, pops = 0, full_seen = 0, both = 0;

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full && count == 0, "empty after reset");
    // fall-through: one push, visible the next cycle
    push = 1; din = 32'hcafe0001;
    @(negedge clk); push = 0; model.push_back(32'hcafe0001);
    check(!empty && dout == 32'hcafe0001 && count == 1, "first word falls through");
    for (int t = 0; t < 4000; t++) begin
      int phase, pp;
      phase = (t / 500) % 3;               // fill-biased, drain-biased, balanced
      pp = (phase == 0) ? 80 : (phase == 1) ? 30 : 50;
      push = ($urandom_range(99) < pp) && !full;
      pop  = ($urandom_range(99) < 100 - pp + 10) && !empty;
      if (full) push = (t % 2 == 0);
      if (full && push) pop = 1;
      din  = $urandom;
      check(count == model.size(), $sformatf("count %0d vs %0d", count, model.size()));
      check(empty == (model.size() == 0) && full == (model.size() == 16), "flags");
      if (!empty) check(dout == model[0], $sformatf("dout %h vs %h", dout, model[0]));
      @(posedge clk);
      if (full) full_seen++;
      if (full && push && pop) both++;
      if (pop)  begin void'(model.pop_front()); pops++; end
      if (push) begin model.push_back(din); pushes++; end
      @(negedge clk);
    end
    push = 0; pop = 0;
    $display("pushes=%0d pops=%0d full_cycles=%0d push_pop_when_full=%0d", pushes, pops, full_seen, both);
    check(full_seen > 0 && both > 0, "full FIFO exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
