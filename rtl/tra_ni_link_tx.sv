// Data-link interface of the Tra-NI send block.
//
// Moves flits from the sending FIFO onto the outgoing network link under credit-based
// flow control. The counter starts at CREDITS, the number of flit slots in the
// receiver's input buffer; a flit is sent only when a credit is left, and every pulse on
// tx_credit (one receiver slot freed) returns one. tx_valid/tx_flit are registered, so a
// flit leaves one cycle after it is popped; with credits available the link carries one
// flit per cycle. The design names this block only; credit flow control, the kind used
// by the wormhole network the interface was first paired with, is this
// implementation's choice, as is the credit count.
module tra_ni_link_tx
  import tra_ni_pkg::*;
#(
  parameter int unsigned CREDITS = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  // sending FIFO side
  input  logic  fifo_empty,
  input  flit_t fifo_dout,
  output logic  fifo_pop,
  // network side
  output logic  tx_valid,
  output flit_t tx_flit,
  input  logic  tx_credit
);
  localparam int unsigned CW = $clog2(CREDITS + 1);
  logic [CW-1:0] credits;

  assign fifo_pop = !fifo_empty && (credits != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      credits  <= CW'(CREDITS);
      tx_valid <= 1'b0;
      tx_flit  <= '0;
    end else begin
      tx_valid <= fifo_pop;
      if (fifo_pop) tx_flit <= fifo_dout;
      credits  <= credits - CW'(fifo_pop) + CW'(tx_credit);
    end
  end

  a_credit_bound: assert property (@(posedge clk) disable iff (!rst_n)
                                   credits <= CW'(CREDITS));
endmodule
