// Packetizer of the Tra-NI send block.
//
// The kernel hands over a message as a stream of 32-bit words on data_in, one word per
// cycle in which send is high and send_available is high:
//   word 0 : send descriptor {len, dst_x, dst_y}
//   word 1 : segment header {ctrl, app, src_task, dst_task}
//   then len data words.
// The packetizer turns this into network flits (destination address, size, segment
// header, data) and pushes them into the sending FIFO. The descriptor expands into two
// flits, so send_available drops for exactly one cycle after it to emit the size flit.
// send_available is also low while the sending FIFO is full. That the send block
// packetizes in hardware follows the design; the word layout and this handshake are
// this implementation's choice.
module tra_ni_packetizer
  import tra_ni_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // kernel side
  input  logic  send,
  input  flit_t data_in,
  output logic  send_available,
  // sending FIFO side
  output logic  fifo_push,
  output flit_t fifo_din,
  input  logic  fifo_full
);
  typedef enum logic [1:0] {S_DESC, S_SIZE, S_SEG, S_DATA} state_t;
  state_t      state;
  logic [15:0] len_q, left_q;
  send_desc_t  desc;

  assign desc           = send_desc_t'(data_in);
  assign send_available = !fifo_full && (state != S_SIZE);

  always_comb begin
    fifo_push = 1'b0;
    fifo_din  = data_in;
    unique case (state)
      S_DESC: begin
        fifo_push = send && send_available;
        fifo_din  = {16'h0, desc.dst_x, desc.dst_y};
      end
      S_SIZE: begin
        fifo_push = !fifo_full;
        fifo_din  = flit_t'(len_q) + 1'b1;   // segment header + data words
      end
      default: begin
        fifo_push = send && send_available;
        fifo_din  = data_in;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_DESC;
      len_q  <= '0;
      left_q <= '0;
    end else begin
      unique case (state)
        S_DESC: if (send && send_available) begin
          len_q <= desc.len;
          state <= S_SIZE;
        end
        S_SIZE: if (!fifo_full) state <= S_SEG;
        S_SEG: if (send && send_available) begin
          left_q <= len_q;
          state  <= (len_q == 0) ? S_DESC : S_DATA;
        end
        S_DATA: if (send && send_available) begin
          left_q <= left_q - 1'b1;
          if (left_q == 16'd1) state <= S_DESC;
        end
      endcase
    end
  end
endmodule
