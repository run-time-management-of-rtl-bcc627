// NI dual-port memory of the Tra-NI receive block.
//
// One word array shared by the data packets buffer (SLOTS slots of SLOT_WORDS words,
// from address 0) and the control packets FIFO (CTRL_WORDS words above them), as the
// block diagram of the interface draws them in one memory. Port A serves the kernel
// interface controller, port B the depacketizing controller. Each port has its own
// address, write enable and write data, and reads synchronously: rdata shows the word
// at the address of the previous cycle. Writes to the same address from both ports in
// one cycle are not expected (the two controllers own disjoint regions at any time).
module tra_ni_dpram
  import tra_ni_pkg::*;
#(
  parameter int unsigned DEPTH = 1088,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  flit_t         a_wdata,
  output flit_t         a_rdata,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  flit_t         b_wdata,
  output flit_t         b_rdata
);
  flit_t mem [DEPTH];

  // Both write ports live in one process so that the array has a single driver.
  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end
endmodule
