// Kernel interface controller of the Tra-NI receive block.
//
// Serves the kernel's receive requests. The kernel raises lookup for one cycle with the
// wanted key on data_in ({ctrl, 7'b0, app, src_task, dst_task}, the segment header
// layout). The controller searches the stored messages (through the shared registers)
// and then offers a status word on data_out with read_available high:
//   hit=1 : len data words follow, one per read pulse, read straight out of the NI
//           memory; after the last one the slot is freed;
//   hit=0 : nothing follows; the key is kept as a pending request, and the interrupt
//           line rises once a message with that key has arrived (the kernel then repeats
//           the lookup).
// A lookup with ctrl=1 pops the oldest control packet instead: the status word, then the
// segment header word, then len data words. Every read pulse consumes the shown word
// and the next word is shown in the following cycle, so a message of len words is
// copied in len+1 cycles after the status word. The lookup/hit/miss/interrupt behaviour
// follows the design; the word formats and the one-word-per-read handshake are this
// implementation's choice.
module tra_ni_kic
  import tra_ni_pkg::*;
#(
  parameter int unsigned SLOTS      = 8,
  parameter int unsigned SLOT_WORDS = 128,
  parameter int unsigned CTRL_WORDS = 64,
  parameter int unsigned AW         = $clog2(SLOTS * SLOT_WORDS + CTRL_WORDS),
  parameter int unsigned SW         = $clog2(SLOTS),
  parameter int unsigned CAW        = $clog2(CTRL_WORDS)
) (
  input  logic           clk,
  input  logic           rst_n,
  // kernel side
  input  logic           lookup,
  input  flit_t          data_in,
  output flit_t          data_out,
  output logic           read_available,
  input  logic           read,
  // shared controlling registers
  output seg_key_t       lk_key,
  input  logic           lk_hit,
  input  logic [SW-1:0]  lk_idx,
  input  logic [15:0]    lk_len,
  output logic           release_slot,
  output logic [SW-1:0]  release_idx,
  output logic           pend_add,
  output seg_key_t       pend_key,
  input  logic           ctrl_empty,
  input  logic [CAW-1:0] ctrl_head,
  output logic           ctrl_release,
  output logic [CAW:0]   ctrl_release_words,
  // memory port A
  output logic [AW-1:0]  m_addr,
  input  flit_t          m_rdata
);
  localparam int unsigned CTRL_BASE = SLOTS * SLOT_WORDS;

  typedef enum logic [1:0] {S_IDLE, S_CLEN, S_RESP, S_DATA} state_t;
  state_t        state;
  seg_hdr_t      req;
  seg_key_t      key_q;
  logic          ctrl_q, hit_q;
  logic [SW-1:0] slot_q;
  logic [15:0]   len_q, off_q, total;
  lookup_status_t status;

  assign req   = seg_hdr_t'(data_in);
  assign total = ctrl_q ? len_q + 16'd1 : len_q;

  function automatic logic [AW-1:0] word_addr(logic ctrl, logic [SW-1:0] slot,
                                               logic [CAW-1:0] head, logic [15:0] off);
    if (ctrl) return AW'(CTRL_BASE) + AW'(CAW'(head + CAW'(off) + 1'b1));
    else      return AW'(slot) * AW'(SLOT_WORDS) + AW'(off);
  endfunction

  always_comb begin
    status      = '0;
    status.hit  = hit_q;
    status.ctrl = ctrl_q;
    status.len  = len_q;
  end

  always_comb begin
    lk_key             = (state == S_IDLE) ? req.key : key_q;
    pend_add           = 1'b0;
    pend_key           = req.key;
    release_slot       = 1'b0;
    release_idx        = slot_q;
    ctrl_release       = 1'b0;
    ctrl_release_words = (CAW+1)'(len_q + 16'd2);
    read_available     = 1'b0;
    data_out           = m_rdata;
    m_addr             = word_addr(ctrl_q, slot_q, ctrl_head, off_q);
    unique case (state)
      S_IDLE: begin
        m_addr   = AW'(CTRL_BASE) + AW'(ctrl_head);
        pend_add = lookup && !req.ctrl && !lk_hit;
      end
      S_CLEN: m_addr = word_addr(1'b1, slot_q, ctrl_head, 16'd0);
      S_RESP: begin
        read_available = 1'b1;
        data_out       = flit_t'(status);
        m_addr         = word_addr(ctrl_q, slot_q, ctrl_head, 16'd0);
        if (read && hit_q && total == 0) release_slot = 1'b1;
      end
      S_DATA: begin
        read_available = 1'b1;
        data_out       = m_rdata;
        m_addr         = word_addr(ctrl_q, slot_q, ctrl_head, read ? off_q + 16'd1 : off_q);
        if (read && off_q + 16'd1 == total) begin
          release_slot = !ctrl_q;
          ctrl_release = ctrl_q;
        end
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      key_q  <= '0;
      ctrl_q <= 1'b0;
      hit_q  <= 1'b0;
      slot_q <= '0;
      len_q  <= '0;
      off_q  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (lookup) begin
          key_q  <= req.key;
          ctrl_q <= req.ctrl;
          off_q  <= '0;
          if (req.ctrl) begin
            hit_q <= !ctrl_empty;
            len_q <= '0;
            state <= ctrl_empty ? S_RESP : S_CLEN;
          end else begin
            hit_q  <= lk_hit;
            slot_q <= lk_idx;
            len_q  <= lk_hit ? lk_len : 16'd0;
            state  <= S_RESP;
          end
        end
        S_CLEN: begin
          len_q <= m_rdata[15:0];
          state <= S_RESP;
        end
        S_RESP: if (read) state <= (hit_q && total != 0) ? S_DATA : S_IDLE;
        S_DATA: if (read) begin
          off_q <= off_q + 1'b1;
          if (off_q + 16'd1 == total) state <= S_IDLE;
        end
      endcase
    end
  end

  a_lookup_idle: assert property (@(posedge clk) disable iff (!rst_n) lookup |-> state == S_IDLE);
  a_read_avail:  assert property (@(posedge clk) disable iff (!rst_n) read |-> read_available);
endmodule
