// Self-checking testbench of tra_ni_link_tx, the credit-based data-link interface.
//
// A queue stands for the sending FIFO and a receiver model with an 8-flit buffer drains
// at a random rate and returns one credit per drained flit. Checked: flits leave in
// order and unchanged, the receiver buffer never overflows, the sender stops when the
// credits are used up, and with a receiver that drains every cycle the link carries one
// flit per cycle (100 flits in 100 cycles after the first one).
module tb_tra_ni_link_tx;
  import tra_ni_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  fifo_empty, fifo_pop, tx_valid, tx_credit;
  flit_t fifo_dout, tx_flit;

  tra_ni_link_tx #(.CREDITS(8)) dut (.clk, .rst_n, .fifo_empty, .fifo_dout, .fifo_pop,
                                     .tx_valid, .tx_flit, .tx_credit);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  flit_t src_q[$], rx_buf[$];
  int    next_in = 0, next_out = 0, drain_pct = 100, n_rx = 0, first_rx = -1, last_rx = 0,
         n_stall = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  assign fifo_empty = (src_q.size() == 0);
  assign fifo_dout  = fifo_empty ? '0 : src_q[0];

  // the FIFO model changes only at the falling edge, away from the sampling edge
  logic popped = 1'b0;
  always @(negedge clk) if (popped) void'(src_q.pop_front());

  always @(posedge clk) if (rst_n) begin
    popped <= fifo_pop;
    if (!fifo_empty && !fifo_pop) n_stall++;
    tx_credit <= 1'b0;
    if (rx_buf.size() > 0 && $urandom_range(99) < drain_pct) begin
      flit_t f;
      f = rx_buf.pop_front();
      check(f == flit_t'(next_out), $sformatf("flit %0d arrived as %0d", next_out, f));
      next_out++;
      tx_credit <= 1'b1;
    end
    if (tx_valid) begin
      check(rx_buf.size() < 8, "receiver buffer overflow");
      rx_buf.push_back(tx_flit);
      n_rx++;
      if (first_rx < 0) first_rx = cyc;
      last_rx = cyc;
    end
  end

  initial begin
    tx_credit = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // full rate
    for (int i = 0; i < 100; i++) src_q.push_back(flit_t'(next_in++));
    while (n_rx < 100) @(posedge clk);
    $display("100 flits in %0d cycles", last_rx - first_rx + 1);
    check(last_rx - first_rx + 1 == 100, "one flit per cycle with free credits");
    check(n_stall == 0, "no stall with free credits");
    // slow receiver: credits run out
    drain_pct = 20;
    for (int i = 0; i < 300; i++) src_q.push_back(flit_t'(next_in++));
    while (next_out < next_in) @(posedge clk);
    $display("credit stalls=%0d", n_stall);
    check(n_stall > 0, "the sender stalled on credits");
    check(next_out == 400, "all flits delivered");
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
