// Self-checking testbench of tra_ni_kic, the kernel interface controller, together with
// the shared registers and the NI memory it reads.
//
// The testbench itself plays the network side: it writes message words into the memory
// and commits slots and control packets in the registers. A kernel model then looks
// messages up. Checked: a hit returns the status word {hit, ctrl, len} and then exactly
// the stored words, one per read, and frees the slot; a miss returns hit=0, records the
// request, and the interrupt rises when the message is stored; a control lookup returns
// the header and data of the oldest control packet and frees its ring space; a control
// lookup with no control packet returns hit=0. A message of len words is read in len+1
// read cycles after the status word appears.
module tb_tra_ni_kic;
  import tra_ni_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        lookup, read, read_available, lk_hit, release_slot, pend_add, ctrl_empty,
               ctrl_release, free_valid, alloc, commit, ctrl_commit, irq, b_we;
  flit_t       data_in, data_out, m_rdata, b_wdata, b_rdata;
  seg_key_t    lk_key, pend_key, commit_key;
  logic [2:0]  lk_idx, release_idx, free_idx, commit_idx;
  logic [15:0] lk_len, commit_len;
  logic [5:0]  ctrl_head, ctrl_tail;
  logic [6:0]  ctrl_release_words, ctrl_space, ctrl_commit_words;
  logic [10:0] m_addr, b_addr;
  logic [3:0]  stored_count;

  tra_ni_kic dut (.clk, .rst_n, .lookup, .data_in, .data_out, .read_available, .read, .lk_key,
    .lk_hit, .lk_idx, .lk_len, .release_slot, .release_idx, .pend_add, .pend_key, .ctrl_empty,
    .ctrl_head, .ctrl_release, .ctrl_release_words, .m_addr, .m_rdata);
  tra_ni_ctrl_regs u_regs (.clk, .rst_n, .free_valid, .free_idx, .alloc, .commit, .commit_idx,
    .commit_key, .commit_len, .ctrl_space, .ctrl_tail, .ctrl_commit, .ctrl_commit_words,
    .lk_key, .lk_hit, .lk_idx, .lk_len, .release_slot, .release_idx, .pend_add, .pend_key,
    .ctrl_empty, .ctrl_head, .ctrl_release, .ctrl_release_words, .irq, .stored_count);
  tra_ni_dpram u_mem (.clk, .a_we(1'b0), .a_addr(m_addr), .a_wdata('0), .a_rdata(m_rdata),
                      .b_we, .b_addr, .b_wdata, .b_rdata);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic flit_t w(int msg, int i);
    return flit_t'(msg * 4096 + i + 7);
  endfunction
  function automatic seg_hdr_t hdr(bit ctrl, int a, int s, int d);
    seg_hdr_t h;
    h = '0; h.ctrl = ctrl; h.key.app = 8'(a); h.key.src_task = 8'(s); h.key.dst_task = 8'(d);
    return h;
  endfunction

  // network side: store a data message in the offered slot
  task automatic net_store(seg_hdr_t h, int len, int msg);
    int slot;
    @(negedge clk);
    slot = int'(free_idx);
    for (int i = 0; i < len; i++) begin
      b_we = 1; b_addr = 11'(slot * 128 + i); b_wdata = w(msg, i);
      @(negedge clk);
    end
    b_we = 0;
    alloc = 1; commit = 1; commit_idx = 3'(slot); commit_key = h.key; commit_len = 16'(len);
    @(negedge clk); alloc = 0; commit = 0;
  endtask
  // network side: append a control packet [len, header, data]
  task automatic net_ctrl(seg_hdr_t h, int len, int msg);
    @(negedge clk);
    for (int i = 0; i < len + 2; i++) begin
      b_we = 1; b_addr = 11'(1024 + ((int'(ctrl_tail) + i) % 64));
      b_wdata = (i == 0) ? flit_t'(len) : (i == 1) ? flit_t'(h) : w(msg, i - 2);
      @(negedge clk);
    end
    b_we = 0;
    ctrl_commit = 1; ctrl_commit_words = 7'(len + 2);
    @(negedge clk); ctrl_commit = 0;
  endtask

  // kernel side
  task automatic k_lookup(seg_hdr_t h, output lookup_status_t st, ref flit_t words[$],
                          output int cycles);
    int t0;
    words.delete();
    @(negedge clk); lookup = 1; data_in = flit_t'(h);
    @(negedge clk); lookup = 0;
    while (!read_available) @(negedge clk);
    st = lookup_status_t'(data_out);
    t0 = cyc;
    read = 1;
    if (st.hit) begin
      int total = st.ctrl ? int'(st.len) + 1 : int'(st.len);
      for (int k = 0; k < total; k++) begin
        @(negedge clk);
        check(read_available, "word available on every read");
        words.push_back(data_out);
      end
    end
    @(negedge clk); read = 0;
    cycles = cyc - t0;
  endtask

  initial begin
    lookup_status_t st;
    flit_t words[$];
    int cycles;
    bit ok;
    lookup = 0; read = 0; data_in = '0; b_we = 0; b_addr = '0; b_wdata = '0;
    alloc = 0; commit = 0; commit_idx = '0; commit_key = '0; commit_len = '0;
    ctrl_commit = 0; ctrl_commit_words = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // hit
    net_store(hdr(0, 1, 2, 3), 100, 1);
    k_lookup(hdr(0, 1, 2, 3), st, words, cycles);
    check(st.hit && !st.ctrl && st.len == 100, "hit status");
    ok = (words.size() == 100);
    foreach (words[i]) if (words[i] != w(1, i)) ok = 0;
    check(ok, "hit data");
    $display("100 words read in %0d cycles after the status word", cycles);
    check(cycles == 101, "one word per read");
    @(negedge clk);
    check(stored_count == 0, "slot freed after the last word");
    // miss, interrupt, hit
    k_lookup(hdr(0, 4, 5, 6), st, words, cycles);
    check(!st.hit && words.size() == 0, "miss status");
    repeat (3) @(negedge clk);
    check(!irq, "no interrupt yet");
    net_store(hdr(0, 4, 5, 6), 3, 2);
    check(irq, "interrupt when the requested message arrives");
    k_lookup(hdr(0, 4, 5, 6), st, words, cycles);
    check(st.hit && st.len == 3 && words.size() == 3 && words[2] == w(2, 2), "hit after interrupt");
    @(negedge clk);
    check(!irq, "interrupt cleared");
    // control packets
    k_lookup(hdr(1, 0, 0, 0), st, words, cycles);
    check(!st.hit && st.ctrl, "control lookup with an empty FIFO");
    net_ctrl(hdr(1, 7, 7, 7), 4, 3);
    net_ctrl(hdr(1, 8, 8, 8), 2, 4);
    check(irq, "interrupt for a control packet");
    k_lookup(hdr(1, 0, 0, 0), st, words, cycles);
    check(st.hit && st.ctrl && st.len == 4 && words.size() == 5, "first control packet");
    check(words.size() == 5 && words[0] == flit_t'(hdr(1, 7, 7, 7)) && words[4] == w(3, 3),
          "first control packet words");
    k_lookup(hdr(1, 0, 0, 0), st, words, cycles);
    check(st.hit && st.len == 2 && words.size() == 3 && words[0] == flit_t'(hdr(1, 8, 8, 8)) &&
          words[2] == w(4, 1), "second control packet");
    @(negedge clk);
    check(ctrl_empty && !irq && ctrl_space == 64, "control FIFO empty again");
    // several messages, read in another order
    for (int m = 0; m < 5; m++) net_store(hdr(0, 9, m, 0), 8 + m, 10 + m);
    for (int m = 4; m >= 0; m--) begin
      k_lookup(hdr(0, 9, m, 0), st, words, cycles);
      ok = st.hit && words.size() == 8 + m;
      foreach (words[i]) if (words[i] != w(10 + m, i)) ok = 0;
      check(ok, $sformatf("message %0d by key", m));
    end
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
