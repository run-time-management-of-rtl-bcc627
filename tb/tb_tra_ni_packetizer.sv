// Self-checking testbench of tra_ni_packetizer.
//
// A kernel model hands over messages (descriptor, segment header, data words) of random
// length and destination while the sending FIFO is modelled as randomly full. Every
// pushed flit is compared with the expected packet: destination address, size (segment
// header plus data), segment header, data. Also checked: send_available drops for
// exactly one cycle after the descriptor (the size flit) when the FIFO is not full,
// and nothing is pushed while the FIFO is full.
module tb_tra_ni_packetizer;
  import tra_ni_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  send, send_available, fifo_push, fifo_full;
  flit_t data_in, fifo_din;

  tra_ni_packetizer dut (.clk, .rst_n, .send, .data_in, .send_available,
                         .fifo_push, .fifo_din, .fifo_full);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  flit_t expect_q[$];
  bit    full_mode = 0;
  int    n_push = 0, n_full_cycles = 0;

  // the full flag changes just after the rising edge, so it is stable at the falling one
  always @(posedge clk) fifo_full <= #1 full_mode && ($urandom_range(99) < 40);

  always @(posedge clk) if (rst_n) begin
    if (fifo_full) begin
      n_full_cycles++;
      check(!fifo_push, "no push while the FIFO is full");
    end
    if (fifo_push) begin
      n_push++;
      if (expect_q.size() == 0) check(0, "unexpected flit");
      else begin
        flit_t e;
        e = expect_q.pop_front();
        check(fifo_din == e, $sformatf("flit %h, expected %h", fifo_din, e));
      end
    end
  end

  task automatic k_send(int dx, int dy, int len, flit_t hdr, int msg);
    for (int k = -2; k < len; k++) begin
      flit_t w;
      if (k == -2)      w = {16'(len), 8'(dx), 8'(dy)};
      else if (k == -1) w = hdr;
      else              w = flit_t'(msg * 1000 + k);
      @(negedge clk);
      while (!send_available) begin send = 0; @(negedge clk); end
      send = 1; data_in = w;
      @(posedge clk);
      if (k == -2 && !full_mode) begin
        // the size flit takes the next cycle
        @(negedge clk); send = 0;
        check(!send_available, "send_available low during the size flit");
        @(negedge clk);
        check(send_available, "send_available back after one cycle");
        @(posedge clk);
      end
    end
    @(negedge clk); send = 0;
  endtask

  initial begin
    int t0;
    send = 0; data_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 40; m++) begin
      int dx, dy, len;
      flit_t hdr;
      dx = $urandom_range(255); dy = $urandom_range(255); len = $urandom_range(0, 20);
      hdr = $urandom;
      full_mode = (m >= 20);
      expect_q.push_back({16'h0, 8'(dx), 8'(dy)});
      expect_q.push_back(flit_t'(len + 1));
      expect_q.push_back(hdr);
      for (int k = 0; k < len; k++) expect_q.push_back(flit_t'(m * 1000 + k));
      t0 = $time;
      k_send(dx, dy, len, hdr, m);
    end
    repeat (3) @(posedge clk);
    check(expect_q.size() == 0, $sformatf("%0d flits never pushed", expect_q.size()));
    $display("pushed=%0d full_cycles=%0d", n_push, n_full_cycles);
    check(n_full_cycles > 0, "full FIFO exercised");
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
