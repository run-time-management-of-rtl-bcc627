// Transport layer depacketizing controller of the Tra-NI receive block.
//
// Takes the flits of incoming packets from the receive input buffer, strips the network
// header (destination address and size flits), reads the segment header and stores the
// segment where the kernel can later find it by its transport-layer key:
//  * a data packet gets a free slot of the data packets buffer (slot s occupies words
//    s*SLOT_WORDS ..); its data words are written there and, after the last one, the slot
//    is committed in the shared registers with its key and length;
//  * a control packet is appended to the control packets FIFO as [len, header, data].
// While no slot (or not enough FIFO space) is free, the controller waits with the
// segment header at the head of the input buffer; the input buffer then fills and the
// link credits stop the sender. One flit is consumed per cycle otherwise. This replaces
// the kernel's depacketizing, buffer placement and bookkeeping, as the design intends;
// the packet layout and the stall policy are this implementation's choice.
module tra_ni_depacketizer
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
  // input buffer (from the network)
  input  logic           in_empty,
  input  flit_t          in_flit,
  output logic           in_pop,
  // shared controlling registers
  input  logic           free_valid,
  input  logic [SW-1:0]  free_idx,
  output logic           alloc,
  output logic           commit,
  output logic [SW-1:0]  commit_idx,
  output seg_key_t       commit_key,
  output logic [15:0]    commit_len,
  input  logic [CAW:0]   ctrl_space,
  input  logic [CAW-1:0] ctrl_tail,
  output logic           ctrl_commit,
  output logic [CAW:0]   ctrl_commit_words,
  // memory port B
  output logic           m_we,
  output logic [AW-1:0]  m_addr,
  output flit_t          m_wdata
);
  localparam int unsigned CTRL_BASE = SLOTS * SLOT_WORDS;

  typedef enum logic [2:0] {S_ADDR, S_SIZE, S_SEG, S_CHDR, S_DATA} state_t;
  state_t        state;
  logic [15:0]   len_q, cnt_q;
  seg_hdr_t      hdr_q, hdr_in;
  logic [SW-1:0] slot_q;

  assign hdr_in = seg_hdr_t'(in_flit);

  function automatic logic [AW-1:0] ctrl_addr(logic [CAW-1:0] tail, logic [15:0] off);
    return AW'(CTRL_BASE) + AW'(CAW'(tail + CAW'(off)));
  endfunction

  logic seg_ok;
  always_comb begin
    if (hdr_in.ctrl) seg_ok = (ctrl_space >= (CAW+1)'(len_q + 16'd2));
    else             seg_ok = free_valid;
  end

  always_comb begin
    in_pop            = 1'b0;
    alloc             = 1'b0;
    commit            = 1'b0;
    commit_idx        = slot_q;
    commit_key        = hdr_q.key;
    commit_len        = len_q;
    ctrl_commit       = 1'b0;
    ctrl_commit_words = (CAW+1)'(len_q + 16'd2);
    m_we              = 1'b0;
    m_addr            = '0;
    m_wdata           = in_flit;
    unique case (state)
      S_ADDR, S_SIZE: in_pop = !in_empty;
      S_SEG: if (!in_empty && seg_ok) begin
        in_pop = 1'b1;
        if (hdr_in.ctrl) begin
          m_we    = 1'b1;                       // word 0 of the entry: the length
          m_addr  = ctrl_addr(ctrl_tail, 16'd0);
          m_wdata = flit_t'(len_q);
        end else begin
          alloc      = 1'b1;
          commit     = (len_q == 0);
          commit_idx = free_idx;
          commit_key = hdr_in.key;
        end
      end
      S_CHDR: begin
        m_we    = 1'b1;                         // word 1: the segment header
        m_addr  = ctrl_addr(ctrl_tail, 16'd1);
        m_wdata = flit_t'(hdr_q);
        ctrl_commit = (len_q == 0);
      end
      S_DATA: if (!in_empty) begin
        in_pop = 1'b1;
        m_we   = 1'b1;
        if (hdr_q.ctrl) m_addr = ctrl_addr(ctrl_tail, cnt_q + 16'd2);
        else            m_addr = AW'(slot_q) * AW'(SLOT_WORDS) + AW'(cnt_q);
        if (cnt_q + 16'd1 == len_q) begin
          commit      = !hdr_q.ctrl;
          ctrl_commit = hdr_q.ctrl;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_ADDR;
      len_q  <= '0;
      cnt_q  <= '0;
      hdr_q  <= '0;
      slot_q <= '0;
    end else begin
      unique case (state)
        S_ADDR: if (!in_empty) state <= S_SIZE;
        S_SIZE: if (!in_empty) begin
          len_q <= in_flit[15:0] - 16'd1;
          state <= S_SEG;
        end
        S_SEG: if (!in_empty && seg_ok) begin
          hdr_q  <= hdr_in;
          slot_q <= free_idx;
          cnt_q  <= '0;
          if (hdr_in.ctrl)      state <= S_CHDR;
          else if (len_q == 0)  state <= S_ADDR;
          else                  state <= S_DATA;
        end
        S_CHDR: state <= (len_q == 0) ? S_ADDR : S_DATA;
        S_DATA: if (!in_empty) begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q + 16'd1 == len_q) state <= S_ADDR;
        end
        default: state <= S_ADDR;
      endcase
    end
  end

  // A data segment must fit one slot, a control entry the control FIFO.
  a_fits_slot: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_SEG && !in_empty && !hdr_in.ctrl) |-> len_q <= 16'(SLOT_WORDS));
  a_fits_ctrl: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_SEG && !in_empty && hdr_in.ctrl) |-> len_q + 16'd2 <= 16'(CTRL_WORDS));
endmodule
