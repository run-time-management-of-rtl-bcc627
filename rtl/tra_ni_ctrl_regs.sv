// Shared controlling registers of the Tra-NI receive block.
//
// The state that the depacketizing controller (network side) and the kernel interface
// controller (kernel side) share:
//  * a slot table, one entry per data packets buffer slot: busy (being filled), valid
//    (complete), the message key {app, src_task, dst_task}, the data length and an order
//    number. Messages with the same key are served in arrival order: a newly committed
//    message gets as order the number of stored messages with its key, and freeing a
//    message decrements the order of the others with that key; a lookup takes the
//    matching slot whose order is 0.
//  * a pending-request table: keys the kernel asked for before they arrived.
//  * head/tail/fill of the control packets FIFO, a ring of CTRL_WORDS words.
//  * the kernel interrupt: high while a stored message matches a pending request, or
//    a control packet waits.
// Lookup is combinational (a parallel search over all slots). Commit, release, allocation
// and pending updates take effect at the next clock edge. The design says only that this
// register file exists and is shared; its contents are derived from what the two
// controllers must do.
module tra_ni_ctrl_regs
  import tra_ni_pkg::*;
#(
  parameter int unsigned SLOTS      = 8,
  parameter int unsigned PEND       = 8,
  parameter int unsigned CTRL_WORDS = 64,
  parameter int unsigned SW         = $clog2(SLOTS),
  parameter int unsigned CAW        = $clog2(CTRL_WORDS)
) (
  input  logic           clk,
  input  logic           rst_n,
  // depacketizer side: slot allocation and commit
  output logic           free_valid,
  output logic [SW-1:0]  free_idx,
  input  logic           alloc,
  input  logic           commit,
  input  logic [SW-1:0]  commit_idx,
  input  seg_key_t       commit_key,
  input  logic [15:0]    commit_len,
  // depacketizer side: control FIFO
  output logic [CAW:0]   ctrl_space,
  output logic [CAW-1:0] ctrl_tail,
  input  logic           ctrl_commit,
  input  logic [CAW:0]   ctrl_commit_words,
  // kernel side: lookup and release
  input  seg_key_t       lk_key,
  output logic           lk_hit,
  output logic [SW-1:0]  lk_idx,
  output logic [15:0]    lk_len,
  input  logic           release_slot,
  input  logic [SW-1:0]  release_idx,
  input  logic           pend_add,
  input  seg_key_t       pend_key,
  // kernel side: control FIFO
  output logic           ctrl_empty,
  output logic [CAW-1:0] ctrl_head,
  input  logic           ctrl_release,
  input  logic [CAW:0]   ctrl_release_words,
  // to the kernel
  output logic           irq,
  output logic [SW:0]    stored_count
);
  logic [SLOTS-1:0] busy, valid;
  seg_key_t         key   [SLOTS];
  logic [15:0]      len   [SLOTS];
  logic [SW-1:0]    order [SLOTS];
  logic [PEND-1:0]  pvalid;
  seg_key_t         pkey  [PEND];
  logic [CAW:0]     ctrl_used;
  logic [SW:0]      ctrl_pkts;
  logic [CAW-1:0]   head_q, tail_q;

  // ---------------- free slot search
  always_comb begin
    free_valid = 1'b0;
    free_idx   = '0;
    for (int i = SLOTS - 1; i >= 0; i--) begin
      if (!busy[i] && !valid[i]) begin
        free_valid = 1'b1;
        free_idx   = SW'(i);
      end
    end
  end

  // ---------------- lookup
  always_comb begin
    lk_hit = 1'b0;
    lk_idx = '0;
    lk_len = '0;
    for (int i = 0; i < SLOTS; i++) begin
      if (valid[i] && key[i] == lk_key && order[i] == '0) begin
        lk_hit = 1'b1;
        lk_idx = SW'(i);
        lk_len = len[i];
      end
    end
  end

  // Number of stored messages with the committing key, not counting one freed now.
  logic [SW:0] same_key_cnt;
  always_comb begin
    same_key_cnt = '0;
    for (int i = 0; i < SLOTS; i++) begin
      if (valid[i] && key[i] == commit_key &&
          !(release_slot && release_idx == SW'(i)))
        same_key_cnt = same_key_cnt + 1'b1;
    end
  end

  always_comb begin
    stored_count = '0;
    for (int i = 0; i < SLOTS; i++) stored_count = stored_count + (SW+1)'(valid[i]);
  end

  // ---------------- interrupt: a pending request can now be served
  logic pend_match;
  always_comb begin
    pend_match = 1'b0;
    for (int p = 0; p < PEND; p++)
      for (int i = 0; i < SLOTS; i++)
        if (pvalid[p] && valid[i] && key[i] == pkey[p]) pend_match = 1'b1;
  end
  assign ctrl_empty = (ctrl_pkts == '0);
  assign irq        = pend_match || !ctrl_empty;

  // ---------------- pending table free entry / duplicate check
  logic            pend_dup, pend_free_ok;
  logic [$clog2(PEND)-1:0] pend_free_idx;
  always_comb begin
    pend_dup      = 1'b0;
    pend_free_ok  = 1'b0;
    pend_free_idx = '0;
    for (int p = PEND - 1; p >= 0; p--) begin
      if (pvalid[p] && pkey[p] == pend_key) pend_dup = 1'b1;
      if (!pvalid[p]) begin
        pend_free_ok  = 1'b1;
        pend_free_idx = ($clog2(PEND))'(p);
      end
    end
  end

  assign ctrl_space = (CAW+1)'(CTRL_WORDS) - ctrl_used;
  assign ctrl_tail  = tail_q;
  assign ctrl_head  = head_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= '0;
      valid     <= '0;
      pvalid    <= '0;
      ctrl_used <= '0;
      ctrl_pkts <= '0;
      head_q    <= '0;
      tail_q    <= '0;
      for (int i = 0; i < SLOTS; i++) begin
        key[i]   <= '0;
        len[i]   <= '0;
        order[i] <= '0;
      end
      for (int p = 0; p < PEND; p++) pkey[p] <= '0;
    end else begin
      // release of a served message; the others with its key move up in order
      if (release_slot) begin
        valid[release_idx] <= 1'b0;
        for (int i = 0; i < SLOTS; i++)
          if (valid[i] && SW'(i) != release_idx && key[i] == key[release_idx] &&
              order[i] != '0)
            order[i] <= order[i] - 1'b1;
        for (int p = 0; p < PEND; p++)
          if (pvalid[p] && pkey[p] == key[release_idx]) pvalid[p] <= 1'b0;
      end
      if (alloc) busy[free_idx] <= 1'b1;
      if (commit) begin
        busy[commit_idx]  <= 1'b0;
        valid[commit_idx] <= 1'b1;
        key[commit_idx]   <= commit_key;
        len[commit_idx]   <= commit_len;
        order[commit_idx] <= SW'(same_key_cnt);
      end
      if (pend_add && !pend_dup && pend_free_ok) begin
        pvalid[pend_free_idx] <= 1'b1;
        pkey[pend_free_idx]   <= pend_key;
      end
      // control packets FIFO bookkeeping
      if (ctrl_commit)  tail_q <= tail_q + CAW'(ctrl_commit_words);
      if (ctrl_release) head_q <= head_q + CAW'(ctrl_release_words);
      ctrl_used <= ctrl_used + (ctrl_commit  ? ctrl_commit_words  : '0)
                             - (ctrl_release ? ctrl_release_words : '0);
      ctrl_pkts <= ctrl_pkts + (SW+1)'(ctrl_commit) - (SW+1)'(ctrl_release);
    end
  end

  a_alloc_free:   assert property (@(posedge clk) disable iff (!rst_n) alloc |-> free_valid);
  a_commit_busy:  assert property (@(posedge clk) disable iff (!rst_n) commit |-> (busy[commit_idx] || alloc));
  a_release_val:  assert property (@(posedge clk) disable iff (!rst_n) release_slot |-> valid[release_idx]);
  a_ctrl_fits:    assert property (@(posedge clk) disable iff (!rst_n) ctrl_commit |-> ctrl_commit_words <= ctrl_space);
endmodule
