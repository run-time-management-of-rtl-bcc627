// Tra-NI: transport-layer aware network interface of one processing element.
//
// The idea: in a message-passing many-core, the kernel of the receiving core normally
// depacketizes each arriving packet, finds it a buffer, and later searches those
// buffers when a task calls receive. This interface does that work in hardware. The
// kernel only issues a lookup with the wanted key {app, src_task, dst_task}; the
// interface answers from its own packet memory, or records the request and interrupts
// the kernel when the message arrives.
//
// Send block   : packetizer -> sending FIFO -> data-link interface (credit flow control)
//                to the network (tx_*).
// Receive block: input buffer (RX_DEPTH flits, credits returned on rx_credit) ->
//                transport layer depacketizing controller -> NI dual-port memory (data
//                packets buffer + control packets FIFO) <- kernel interface controller;
//                the two controllers share the controlling registers.
// Kernel ports : send/data_in/send_available, lookup/data_out/read/read_available,
//                interrupt, as named in the block diagram of the design; data_in is shared
//                by send and lookup. See the sub-modules for the word formats and timing.
// Sizes (SLOTS, CTRL_WORDS, FIFO depths, credits) are this implementation's choices; the
// slot size of 128 words matches the 128-flit messages used to evaluate the design.
module tra_ni
  import tra_ni_pkg::*;
#(
  parameter int unsigned SLOTS        = 8,
  parameter int unsigned SLOT_WORDS   = 128,
  parameter int unsigned CTRL_WORDS   = 64,
  parameter int unsigned PEND         = 8,
  parameter int unsigned SEND_FIFO    = 16,
  parameter int unsigned RX_DEPTH     = 8,
  parameter int unsigned LINK_CREDITS = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  // kernel: send
  input  logic  send,
  input  flit_t data_in,
  output logic  send_available,
  // kernel: receive
  input  logic  lookup,
  output flit_t data_out,
  output logic  read_available,
  input  logic  read,
  output logic  interrupt,
  // network: outgoing link
  output logic  tx_valid,
  output flit_t tx_flit,
  input  logic  tx_credit,
  // network: incoming link
  input  logic  rx_valid,
  input  flit_t rx_flit,
  output logic  rx_credit
);
  localparam int unsigned DEPTH = SLOTS * SLOT_WORDS + CTRL_WORDS;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned SW    = $clog2(SLOTS);
  localparam int unsigned CAW   = $clog2(CTRL_WORDS);

  // ---------------------------------------------------------------- send block
  logic  sf_push, sf_pop, sf_full, sf_empty;
  flit_t sf_din, sf_dout;

  tra_ni_packetizer u_packetizer (
    .clk, .rst_n, .send, .data_in, .send_available,
    .fifo_push(sf_push), .fifo_din(sf_din), .fifo_full(sf_full)
  );

  sync_fifo #(.T(flit_t), .DEPTH(SEND_FIFO)) u_send_fifo (
    .clk, .rst_n, .push(sf_push), .din(sf_din), .pop(sf_pop), .dout(sf_dout),
    .full(sf_full), .empty(sf_empty), .count()
  );

  tra_ni_link_tx #(.CREDITS(LINK_CREDITS)) u_link_tx (
    .clk, .rst_n, .fifo_empty(sf_empty), .fifo_dout(sf_dout), .fifo_pop(sf_pop),
    .tx_valid, .tx_flit, .tx_credit
  );

  // ---------------------------------------------------------------- receive block
  logic  rf_pop, rf_full, rf_empty;
  flit_t rf_dout;

  sync_fifo #(.T(flit_t), .DEPTH(RX_DEPTH)) u_rx_fifo (
    .clk, .rst_n, .push(rx_valid), .din(rx_flit), .pop(rf_pop), .dout(rf_dout),
    .full(rf_full), .empty(rf_empty), .count()
  );
  assign rx_credit = rf_pop;

  logic           free_valid, alloc, commit, ctrl_commit;
  logic [SW-1:0]  free_idx, commit_idx, lk_idx, release_idx;
  seg_key_t       commit_key, lk_key, pend_key;
  logic [15:0]    commit_len, lk_len;
  logic [CAW:0]   ctrl_space, ctrl_commit_words, ctrl_release_words;
  logic [CAW-1:0] ctrl_tail, ctrl_head;
  logic           lk_hit, release_slot, pend_add, ctrl_empty, ctrl_release;
  logic           a_we, b_we;
  logic [AW-1:0]  a_addr, b_addr;
  flit_t          a_rdata, b_wdata;

  tra_ni_depacketizer #(.SLOTS(SLOTS), .SLOT_WORDS(SLOT_WORDS), .CTRL_WORDS(CTRL_WORDS)) u_depack (
    .clk, .rst_n,
    .in_empty(rf_empty), .in_flit(rf_dout), .in_pop(rf_pop),
    .free_valid, .free_idx, .alloc, .commit, .commit_idx, .commit_key, .commit_len,
    .ctrl_space, .ctrl_tail, .ctrl_commit, .ctrl_commit_words,
    .m_we(b_we), .m_addr(b_addr), .m_wdata(b_wdata)
  );

  tra_ni_ctrl_regs #(.SLOTS(SLOTS), .PEND(PEND), .CTRL_WORDS(CTRL_WORDS)) u_regs (
    .clk, .rst_n,
    .free_valid, .free_idx, .alloc, .commit, .commit_idx, .commit_key, .commit_len,
    .ctrl_space, .ctrl_tail, .ctrl_commit, .ctrl_commit_words,
    .lk_key, .lk_hit, .lk_idx, .lk_len, .release_slot, .release_idx, .pend_add, .pend_key,
    .ctrl_empty, .ctrl_head, .ctrl_release, .ctrl_release_words,
    .irq(interrupt), .stored_count()
  );

  tra_ni_dpram #(.DEPTH(DEPTH)) u_mem (
    .clk,
    .a_we(a_we), .a_addr(a_addr), .a_wdata('0), .a_rdata(a_rdata),
    .b_we(b_we), .b_addr(b_addr), .b_wdata(b_wdata), .b_rdata()
  );
  assign a_we = 1'b0;   // the kernel side only reads the NI memory

  tra_ni_kic #(.SLOTS(SLOTS), .SLOT_WORDS(SLOT_WORDS), .CTRL_WORDS(CTRL_WORDS)) u_kic (
    .clk, .rst_n, .lookup, .data_in, .data_out, .read_available, .read,
    .lk_key, .lk_hit, .lk_idx, .lk_len, .release_slot, .release_idx, .pend_add, .pend_key,
    .ctrl_empty, .ctrl_head, .ctrl_release, .ctrl_release_words,
    .m_addr(a_addr), .m_rdata(a_rdata)
  );

  a_rx_room: assert property (@(posedge clk) disable iff (!rst_n) rx_valid |-> !rf_full || rf_pop);
endmodule
