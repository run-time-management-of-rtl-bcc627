// Self-checking testbench of the Tra-NI network interface.
//
// Two interfaces are linked back to back (A's outgoing link into B's incoming link and
// back, credits included) and two kernel models drive their kernel ports. Scenarios:
//  1. lookup before arrival: a miss, then the interrupt when the message arrives, then
//     a hit with the right data;
//  2. a control packet: interrupt, and a control lookup that returns header and data;
//  3. three messages with one key come back in arrival order;
//  4. messages are found by key, not in arrival order;
//  5. more messages than buffer slots: the receiver stalls, the link credits stop the
//     sender, and everything still arrives intact once the kernel drains the buffer;
//  6. the flow workload (a producer task streams 128-word messages to a consumer);
//  7. the ping-pong workload (a 128-word message bounced between two tasks).
// Expected data is generated from the message number; it is compared word by word. The
// link rate of the flow workload is checked against one flit per cycle.
module tb_tra_ni;
  import tra_ni_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  send [2], send_available [2], lookup [2], read_available [2], read [2], interrupt [2];
  flit_t data_in [2], data_out [2];
  logic  tx_valid [2], tx_credit [2], rx_credit [2];
  flit_t tx_flit [2];

  for (genvar i = 0; i < 2; i++) begin : g_ni
    tra_ni u_ni (
      .clk, .rst_n, .send(send[i]), .data_in(data_in[i]), .send_available(send_available[i]),
      .lookup(lookup[i]), .data_out(data_out[i]), .read_available(read_available[i]),
      .read(read[i]), .interrupt(interrupt[i]),
      .tx_valid(tx_valid[i]), .tx_flit(tx_flit[i]), .tx_credit(tx_credit[i]),
      .rx_valid(tx_valid[1-i]), .rx_flit(tx_flit[1-i]), .rx_credit(rx_credit[i])
    );
    assign tx_credit[i] = rx_credit[1-i];
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_miss = 0, n_hit = 0, n_irq_wake = 0, n_ctrl = 0, n_slot_stall = 0, n_credit_stall = 0,
      n_size_bubble = 0;
  always @(posedge clk) if (rst_n) begin
    if (g_ni[1].u_ni.u_depack.state == 3'd2 && !g_ni[1].u_ni.u_depack.in_empty &&
        !g_ni[1].u_ni.u_depack.seg_ok) n_slot_stall++;
    if (!g_ni[0].u_ni.u_link_tx.fifo_empty && g_ni[0].u_ni.u_link_tx.credits == 0) n_credit_stall++;
    if (g_ni[0].u_ni.u_packetizer.state == 2'd1) n_size_bubble++;
  end

  function automatic flit_t word_of(int msg, int k);
    return flit_t'((msg << 16) ^ (k * 32'h9e37) ^ 32'h5a5a0000);
  endfunction

  function automatic seg_hdr_t hdr(bit ctrl, int app, int src, int dst);
    seg_hdr_t h;
    h = '0; h.ctrl = ctrl; h.key.app = 8'(app); h.key.src_task = 8'(src); h.key.dst_task = 8'(dst);
    return h;
  endfunction

  // kernel model: send one message (descriptor, header, len words)
  task automatic k_send(int ni, int dx, int dy, seg_hdr_t h, int len, int msg);
    flit_t w;
    for (int k = -2; k < len; k++) begin
      if (k == -2)      w = flit_t'({16'(len), 8'(dx), 8'(dy)});
      else if (k == -1) w = flit_t'(h);
      else              w = word_of(msg, k);
      @(negedge clk);
      while (!send_available[ni]) @(negedge clk);
      send[ni] = 1'b1; data_in[ni] = w;
      @(posedge clk);
    end
    @(negedge clk); send[ni] = 1'b0;
  endtask

  // kernel model: lookup; returns status and the words that follow
  task automatic k_lookup(int ni, seg_hdr_t h, output lookup_status_t st, ref flit_t words[$]);
    words.delete();
    @(negedge clk); lookup[ni] = 1'b1; data_in[ni] = flit_t'(h);
    @(negedge clk); lookup[ni] = 1'b0;
    while (!read_available[ni]) @(negedge clk);
    st = lookup_status_t'(data_out[ni]);
    read[ni] = 1'b1;
    if (st.hit) begin
      int total = st.ctrl ? int'(st.len) + 1 : int'(st.len);
      for (int k = 0; k < total; k++) begin
        @(negedge clk);
        check(read_available[ni], "read_available dropped inside a message");
        words.push_back(data_out[ni]);
      end
    end
    @(negedge clk); read[ni] = 1'b0;
  endtask

  // kernel model: receive = lookup, and on a miss wait for the interrupt and retry
  task automatic k_receive(int ni, seg_hdr_t h, ref flit_t words[$], output int len);
    lookup_status_t st;
    k_lookup(ni, h, st, words);
    if (st.hit) n_hit++;
    while (!st.hit) begin
      n_miss++;
      while (!interrupt[ni]) @(negedge clk);
      n_irq_wake++;
      k_lookup(ni, h, st, words);
      if (st.hit) n_hit++;
    end
    len = int'(st.len);
  endtask

  task automatic check_words(flit_t words[$], int msg, int len, int skip, string what);
    check(words.size() == len + skip, $sformatf("%s: %0d words, expected %0d", what, words.size(), len + skip));
    for (int k = 0; k < len && k + skip < words.size(); k++)
      if (words[k + skip] != word_of(msg, k)) begin
        check(0, $sformatf("%s: word %0d is %h, expected %h", what, k, words[k + skip], word_of(msg, k)));
        return;
      end
    check(1, what);
  endtask

  flit_t words[$];
  lookup_status_t st;
  int len;

  initial begin
    for (int i = 0; i < 2; i++) begin
      send[i] = 0; lookup[i] = 0; read[i] = 0; data_in[i] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // 1. miss, interrupt, hit
    k_lookup(1, hdr(0, 1, 3, 6), st, words);
    check(!st.hit, "lookup before arrival must miss");
    n_miss++;
    check(!interrupt[1], "no interrupt before arrival");
    k_send(0, 1, 0, hdr(0, 1, 3, 6), 5, 1);
    begin
      int t0 = cyc;
      while (!interrupt[1] && cyc - t0 < 200) @(negedge clk);
      check(interrupt[1], "interrupt after the pending message arrived");
      n_irq_wake++;
    end
    k_lookup(1, hdr(0, 1, 3, 6), st, words);
    check(st.hit && st.len == 5, "hit after interrupt");
    n_hit++;
    check_words(words, 1, 5, 0, "scenario 1 data");
    @(negedge clk);
    check(!interrupt[1], "interrupt clears once served");

    // 2. control packet
    k_send(0, 1, 0, hdr(1, 0, 0, 0), 3, 2);
    while (!interrupt[1]) @(negedge clk);
    k_lookup(1, hdr(1, 0, 0, 0), st, words);
    check(st.hit && st.ctrl && st.len == 3, "control lookup hit");
    n_ctrl++;
    begin
      seg_hdr_t h0;
      h0 = seg_hdr_t'(words[0]);
      check(words.size() > 0 && h0.ctrl, "control header returned first");
    end
    check_words(words, 2, 3, 1, "scenario 2 control data");
    k_lookup(1, hdr(1, 0, 0, 0), st, words);
    check(!st.hit, "control FIFO empty afterwards");

    // 3. same key, arrival order
    for (int m = 0; m < 3; m++) k_send(0, 1, 0, hdr(0, 2, 4, 5), 4 + m, 10 + m);
    repeat (40) @(negedge clk);
    for (int m = 0; m < 3; m++) begin
      k_receive(1, hdr(0, 2, 4, 5), words, len);
      check(len == 4 + m, $sformatf("same-key message %0d length %0d", m, len));
      check_words(words, 10 + m, 4 + m, 0, "scenario 3 order");
    end

    // 4. found by key, not by arrival
    k_send(0, 1, 0, hdr(0, 3, 1, 2), 6, 20);
    k_send(0, 1, 0, hdr(0, 3, 7, 2), 6, 21);
    repeat (30) @(negedge clk);
    k_receive(1, hdr(0, 3, 7, 2), words, len); check_words(words, 21, 6, 0, "scenario 4 second key");
    k_receive(1, hdr(0, 3, 1, 2), words, len); check_words(words, 20, 6, 0, "scenario 4 first key");

    // 5. more messages than slots: stall, then drain
    fork
      for (int m = 0; m < 12; m++) k_send(0, 1, 0, hdr(0, 4, m, 9), 16, 30 + m);
      begin
        repeat (600) @(negedge clk);
        check(n_slot_stall > 0, "receiver stalled on a full buffer");
        check(n_credit_stall > 0, "sender stopped by link credits");
        for (int m = 0; m < 12; m++) begin
          k_receive(1, hdr(0, 4, m, 9), words, len);
          check_words(words, 30 + m, 16, 0, $sformatf("scenario 5 message %0d", m));
        end
      end
    join

    // 6. flow: 8 messages of 128 words, producer A -> consumer B
    begin
      int t0, t1, first_flit = -1, last_flit = 0, nflits = 0;
      t0 = cyc;
      fork
        for (int m = 0; m < 8; m++) k_send(0, 1, 0, hdr(0, 5, 0, 1), 128, 100 + m);
        for (int m = 0; m < 8; m++) begin
          k_receive(1, hdr(0, 5, 0, 1), words, len);
          check_words(words, 100 + m, 128, 0, $sformatf("flow message %0d", m));
        end
        begin
          while (nflits < 8 * 131) begin
            @(posedge clk);
            if (tx_valid[0]) begin
              if (first_flit < 0) first_flit = cyc;
              last_flit = cyc; nflits++;
            end
          end
        end
      join
      t1 = cyc;
      $display("flow: %0d flits on the link in %0d cycles (%0d cycles end to end)",
               nflits, last_flit - first_flit + 1, t1 - t0);
      check(real'(nflits) / real'(last_flit - first_flit + 1) > 0.95,
            "flow: link carries about one flit per cycle");
    end

    // 7. ping-pong: 4 round trips of a 128-word message
    begin
      int t0 = cyc;
      fork
        for (int r = 0; r < 4; r++) begin
          k_send(0, 1, 0, hdr(0, 6, 0, 1), 128, 200 + r);
          k_receive(0, hdr(0, 6, 1, 0), words, len);
          check_words(words, 300 + r, 128, 0, $sformatf("pong %0d", r));
        end
        begin
          flit_t w2[$];
          int l2;
          for (int r = 0; r < 4; r++) begin
            k_receive(1, hdr(0, 6, 0, 1), w2, l2);
            check_words(w2, 200 + r, 128, 0, $sformatf("ping %0d", r));
            k_send(1, 0, 0, hdr(0, 6, 1, 0), 128, 300 + r);
          end
        end
      join
      $display("ping-pong: 4 round trips of 128 words in %0d cycles (%0.3f flits/cycle per direction)",
               cyc - t0, real'(8 * 131) / real'(cyc - t0));
    end

    $display("mechanisms: miss=%0d hit=%0d irq_wake=%0d ctrl=%0d slot_stall=%0d credit_stall=%0d size_bubble=%0d",
             n_miss, n_hit, n_irq_wake, n_ctrl, n_slot_stall, n_credit_stall, n_size_bubble);
    check(n_miss > 0 && n_hit > 0 && n_irq_wake > 0 && n_ctrl > 0 && n_size_bubble > 0,
          "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
