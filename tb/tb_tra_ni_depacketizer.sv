// Self-checking testbench of tra_ni_depacketizer, the transport-layer depacketizing
// controller, together with the shared registers and the NI memory it writes.
//
// A queue stands for the receive input buffer. Packets (destination, size, segment
// header, data) are put in it; afterwards the testbench looks each message up by its key
// in the registers, as the kernel interface would, and reads its words from the memory.
// Checked: every data message lands in a slot with the right key, length and words; a
// control packet is stored in the control ring as [length, header, data]; with all eight
// slots full the controller stops taking flits (the input buffer fills) and goes on once
// a slot is freed; without stalls one flit is taken per cycle (a 128-word message plus
// its three header flits in 131 cycles).
module tb_tra_ni_depacketizer;
  import tra_ni_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_empty, in_pop, free_valid, alloc, commit, ctrl_commit, m_we;
  logic        lk_hit, release_slot, ctrl_empty, irq, ctrl_release;
  flit_t       in_flit, m_wdata, a_rdata, b_rdata;
  logic [2:0]  free_idx, commit_idx, lk_idx, release_idx;
  seg_key_t    commit_key, lk_key;
  logic [15:0] commit_len, lk_len;
  logic [6:0]  ctrl_space, ctrl_commit_words, ctrl_release_words;
  logic [5:0]  ctrl_tail, ctrl_head;
  logic [10:0] m_addr, a_addr;
  logic [3:0]  stored_count;

  tra_ni_depacketizer dut (.clk, .rst_n, .in_empty, .in_flit, .in_pop, .free_valid, .free_idx,
    .alloc, .commit, .commit_idx, .commit_key, .commit_len, .ctrl_space, .ctrl_tail,
    .ctrl_commit, .ctrl_commit_words, .m_we, .m_addr, .m_wdata);
  tra_ni_ctrl_regs u_regs (.clk, .rst_n, .free_valid, .free_idx, .alloc, .commit, .commit_idx,
    .commit_key, .commit_len, .ctrl_space, .ctrl_tail, .ctrl_commit, .ctrl_commit_words,
    .lk_key, .lk_hit, .lk_idx, .lk_len, .release_slot, .release_idx, .pend_add(1'b0),
    .pend_key('0), .ctrl_empty, .ctrl_head, .ctrl_release, .ctrl_release_words, .irq,
    .stored_count);
  tra_ni_dpram u_mem (.clk, .a_we(1'b0), .a_addr, .a_wdata('0), .a_rdata,
                      .b_we(m_we), .b_addr(m_addr), .b_wdata(m_wdata), .b_rdata);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // input buffer model; changes at the falling edge
  flit_t q[$];
  logic  popped = 0;
  int    n_pop = 0, n_stall = 0;
  always @(posedge clk) if (rst_n) begin
    popped <= in_pop;
    if (in_pop) n_pop++;
    if (!in_empty && !in_pop) n_stall++;
  end
  always @(negedge clk) begin
    if (popped) void'(q.pop_front());
    in_empty = (q.size() == 0);
    in_flit  = (q.size() > 0) ? q[0] : '0;
  end

  function automatic flit_t w(int msg, int i);
    return flit_t'(msg * 4096 + i);
  endfunction
  function automatic seg_hdr_t hdr(bit ctrl, int a, int s, int d);
    seg_hdr_t h;
    h = '0; h.ctrl = ctrl; h.key.app = 8'(a); h.key.src_task = 8'(s); h.key.dst_task = 8'(d);
    return h;
  endfunction
  task automatic put(seg_hdr_t h, int len, int msg);
    q.push_back(32'h0000_0102);
    q.push_back(flit_t'(len + 1));
    q.push_back(flit_t'(h));
    for (int i = 0; i < len; i++) q.push_back(w(msg, i));
  endtask

  task automatic read_word(int addr, output flit_t d);
    @(negedge clk); a_addr = 11'(addr);
    @(negedge clk); d = a_rdata;
  endtask

  task automatic check_msg(seg_hdr_t h, int len, int msg);
    flit_t d;
    bit    ok = 1;
    lk_key = h.key; #1;
    check(lk_hit && lk_len == 16'(len), $sformatf("message %0d stored with length %0d", msg, len));
    for (int i = 0; i < len; i++) begin
      read_word(int'(lk_idx) * 128 + i, d);
      if (d != w(msg, i)) ok = 0;
    end
    check(ok, $sformatf("message %0d words", msg));
  endtask

  task automatic free_key(seg_hdr_t h);
    @(negedge clk); lk_key = h.key; #1;
    release_slot = 1; release_idx = lk_idx;
    @(negedge clk); release_slot = 0;
  endtask

  initial begin
    int t0, p0;
    flit_t d;
    release_slot = 0; release_idx = '0; ctrl_release = 0; ctrl_release_words = '0;
    lk_key = '0; a_addr = '0; in_empty = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // rate: one 128-word message
    @(negedge clk);
    put(hdr(0, 1, 1, 1), 128, 1);
    t0 = cyc; p0 = n_pop;
    while (n_pop - p0 < 131) @(posedge clk);
    $display("131 flits taken in %0d cycles", cyc - t0);
    check(cyc - t0 <= 131 + 2, "one flit per cycle");
    repeat (3) @(posedge clk);
    check_msg(hdr(0, 1, 1, 1), 128, 1);
    // control packet
    put(hdr(1, 2, 0, 0), 5, 2);
    repeat (20) @(posedge clk);
    check(!ctrl_empty && ctrl_tail == 7, "control packet committed");
    read_word(1024 + 0, d); check(d == 5, "control entry length");
    read_word(1024 + 1, d); check(d == flit_t'(hdr(1, 2, 0, 0)), "control entry header");
    for (int i = 0; i < 5; i++) begin
      read_word(1024 + 2 + i, d); check(d == w(2, i), "control entry data");
    end
    // fill the remaining seven slots and one more
    for (int m = 0; m < 8; m++) put(hdr(0, 3, m, 0), 16, 10 + m);
    repeat (300) @(posedge clk);
    check(stored_count == 8 && q.size() > 0, "stalled with all slots full");
    begin
      int n0;
      n0 = n_pop;
      repeat (20) @(posedge clk);
      check(n_pop == n0, "no flit taken while stalled");
    end
    free_key(hdr(0, 1, 1, 1));
    repeat (40) @(posedge clk);
    check(q.size() == 0, "continues after a slot is freed");
    for (int m = 0; m < 8; m++) check_msg(hdr(0, 3, m, 0), 16, 10 + m);
    $display("stall cycles=%0d", n_stall);
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
