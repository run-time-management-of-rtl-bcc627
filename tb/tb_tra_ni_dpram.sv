// Self-checking testbench of tra_ni_dpram, the dual-port memory of the network interface.
//
// Writes random words through both ports at random addresses (port B fills, as the
// depacketizer does; port A also writes in the second half), reads them back through both
// ports and compares them with an array kept by the testbench. Reads are synchronous:
// the word appears one cycle after the address. Full default size (8 slots of 128 words
// plus the 64-word control ring).
module tb_tra_ni_dpram;
  import tra_ni_pkg::*;
  localparam int DEPTH = 1088, AW = $clog2(DEPTH);
  logic clk = 0;
  always #5 clk = ~clk;

  logic          a_we, b_we;
  logic [AW-1:0] a_addr, b_addr;
  flit_t         a_wdata, b_wdata, a_rdata, b_rdata;

  tra_ni_dpram dut (.clk, .a_we, .a_addr, .a_wdata, .a_rdata, .b_we, .b_addr, .b_wdata, .b_rdata);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  flit_t model [DEPTH];
  bit    known [DEPTH];

  initial begin
    a_we = 0; b_we = 0; a_addr = '0; b_addr = '0; a_wdata = '0; b_wdata = '0;
    foreach (known[i]) known[i] = 0;
    // fill every word through port B
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      b_we = 1; b_addr = AW'(i); b_wdata = $urandom;
      model[i] = b_wdata; known[i] = 1;
    end
    @(negedge clk); b_we = 0;
    // random mixed traffic
    for (int t = 0; t < 5000; t++) begin
      int ra, rb;
      bit  wa, wb;
      @(negedge clk);
      a_addr = AW'($urandom_range(DEPTH-1));
      do b_addr = AW'($urandom_range(DEPTH-1)); while (b_addr == a_addr);
      wa = (t > 2500) && $urandom_range(3) == 0;
      wb = $urandom_range(3) == 0;
      a_we = wa; b_we = wb; a_wdata = $urandom; b_wdata = $urandom;
      ra = int'(a_addr); rb = int'(b_addr);
      @(posedge clk); #1;
      if (!wa) check(a_rdata == model[ra], $sformatf("port A word %0d", ra));
      if (!wb) check(b_rdata == model[rb], $sformatf("port B word %0d", rb));
      if (wa) model[ra] = a_wdata;
      if (wb) model[rb] = b_wdata;
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
