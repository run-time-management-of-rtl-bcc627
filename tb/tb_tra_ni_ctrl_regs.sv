// Self-checking testbench of tra_ni_ctrl_regs, the shared controlling registers of the
// network interface's receive block.
//
// Drives both sides directly: allocation and commit of slots (as the depacketizer does),
// lookup, release and pending requests (as the kernel interface does), and the control
// FIFO pointers. Checked against values worked out by hand: the lowest free slot is
// offered; a committed message is found by its key with its slot and length; two
// messages with the same key are found in arrival order; with all slots used no free
// slot is offered; a pending request raises the interrupt only once its message is
// stored, and serving it clears both; the control FIFO's space, tail, head and the
// interrupt follow the committed and released word counts.
module tb_tra_ni_ctrl_regs;
  import tra_ni_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       free_valid, alloc, commit, release_slot, pend_add, ctrl_commit, ctrl_release;
  logic       lk_hit, ctrl_empty, irq;
  logic [2:0] free_idx, commit_idx, lk_idx, release_idx;
  seg_key_t   commit_key, lk_key, pend_key;
  logic [15:0] commit_len, lk_len;
  logic [6:0] ctrl_space, ctrl_commit_words, ctrl_release_words;
  logic [5:0] ctrl_tail, ctrl_head;
  logic [3:0] stored_count;

  tra_ni_ctrl_regs dut (.clk, .rst_n, .free_valid, .free_idx, .alloc, .commit, .commit_idx,
    .commit_key, .commit_len, .ctrl_space, .ctrl_tail, .ctrl_commit, .ctrl_commit_words,
    .lk_key, .lk_hit, .lk_idx, .lk_len, .release_slot, .release_idx, .pend_add, .pend_key,
    .ctrl_empty, .ctrl_head, .ctrl_release, .ctrl_release_words, .irq, .stored_count);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic seg_key_t k(int a, int s, int d);
    seg_key_t r;
    r.app = 8'(a); r.src_task = 8'(s); r.dst_task = 8'(d);
    return r;
  endfunction

  task automatic clear();
    alloc = 0; commit = 0; release_slot = 0; pend_add = 0; ctrl_commit = 0; ctrl_release = 0;
  endtask

  // allocate the offered slot and commit it in the same cycle
  task automatic store(seg_key_t key, int len, output int idx);
    @(negedge clk);
    idx = int'(free_idx);
    alloc = 1; commit = 1; commit_idx = free_idx; commit_key = key; commit_len = 16'(len);
    @(negedge clk); clear();
  endtask

  task automatic look(seg_key_t key);
    lk_key = key; #1;
  endtask

  task automatic free_slot(int idx);
    @(negedge clk); release_slot = 1; release_idx = 3'(idx);
    @(negedge clk); clear();
  endtask

  initial begin
    int i0, i1, i2, idx;
    clear(); lk_key = '0; pend_key = '0; commit_key = '0; commit_idx = '0; commit_len = '0;
    release_idx = '0; ctrl_commit_words = '0; ctrl_release_words = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(free_valid && free_idx == 0 && !irq && ctrl_empty && ctrl_space == 64 &&
          stored_count == 0, "reset state");
    // a slot being filled is not offered again
    alloc = 1; @(negedge clk); clear();
    check(free_idx == 1, "busy slot not offered");
    commit = 1; commit_idx = 0; commit_key = k(1, 2, 3); commit_len = 10;
    @(negedge clk); clear();
    look(k(1, 2, 3));
    check(lk_hit && lk_idx == 0 && lk_len == 10 && stored_count == 1, "committed message found");
    look(k(1, 2, 4));
    check(!lk_hit, "other key not found");
    // same key twice: arrival order
    store(k(5, 5, 5), 20, i1);
    store(k(5, 5, 5), 30, i2);
    check(i1 == 1 && i2 == 2, "lowest free slots used");
    look(k(5, 5, 5));
    check(lk_hit && lk_idx == 1 && lk_len == 20, "first of two same-key messages");
    free_slot(1);
    look(k(5, 5, 5));
    check(lk_hit && lk_idx == 2 && lk_len == 30, "second one after the first is served");
    // fill every slot
    for (int m = 0; m < 6; m++) store(k(7, m, 0), m + 1, idx);
    check(!free_valid && stored_count == 8, "no free slot when full");
    // pending request
    free_slot(0); free_slot(2);
    @(negedge clk); pend_add = 1; pend_key = k(9, 9, 9); @(negedge clk); clear();
    check(!irq, "no interrupt before the message arrives");
    store(k(9, 9, 9), 4, idx);
    check(irq, "interrupt when the requested message is stored");
    look(k(9, 9, 9));
    check(lk_hit && lk_len == 4, "requested message found");
    free_slot(int'(lk_idx));
    check(!irq, "interrupt cleared after it is served");
    // control FIFO
    @(negedge clk); ctrl_commit = 1; ctrl_commit_words = 10; @(negedge clk); clear();
    check(!ctrl_empty && irq && ctrl_space == 54 && ctrl_tail == 10 && ctrl_head == 0,
          "control packet stored");
    @(negedge clk); ctrl_commit = 1; ctrl_commit_words = 50; @(negedge clk); clear();
    check(ctrl_space == 4 && ctrl_tail == 60, "second control packet");
    @(negedge clk); ctrl_release = 1; ctrl_release_words = 10; @(negedge clk); clear();
    check(!ctrl_empty && ctrl_head == 10 && ctrl_space == 14, "first control packet read");
    @(negedge clk); ctrl_commit = 1; ctrl_commit_words = 8; @(negedge clk); clear();
    check(ctrl_tail == 4 && ctrl_space == 6, "ring wraps");
    @(negedge clk); ctrl_release = 1; ctrl_release_words = 50; @(negedge clk); clear();
    @(negedge clk); ctrl_release = 1; ctrl_release_words = 8; @(negedge clk); clear();
    check(ctrl_empty && !irq && ctrl_space == 64 && ctrl_head == 4, "control FIFO empty again");
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
