// Types and constants shared by the transport-layer aware network interface (Tra-NI).
//
// A packet on the network is a run of 32-bit flits:
//   flit 0 : destination PE address {16'b0, x[7:0], y[7:0]}
//   flit 1 : size, the number of flits that follow (segment header + data words)
//   flit 2 : segment header {ctrl, 7'b0, app[7:0], src_task[7:0], dst_task[7:0]}
//   flit 3.. : data words
// The address-then-segment layering follows the packet/segment picture of the design;
// the field widths, the size flit and the control bit are this implementation's choice.
package tra_ni_pkg;

  localparam int unsigned FLIT_W = 32;
  typedef logic [FLIT_W-1:0] flit_t;

  // Transport-layer key of a message: which application, from which task, to which task.
  typedef struct packed {
    logic [7:0] app;
    logic [7:0] src_task;
    logic [7:0] dst_task;
  } seg_key_t;

  typedef struct packed {
    logic       ctrl;      // 1: kernel control packet, 0: task data packet
    logic [6:0] rsvd;
    seg_key_t   key;
  } seg_hdr_t;

  // First word the kernel writes for a send: destination PE and data length.
  typedef struct packed {
    logic [15:0] len;      // number of data words after the segment header
    logic [7:0]  dst_x;
    logic [7:0]  dst_y;
  } send_desc_t;

  // Status word returned by the kernel interface after a lookup.
  typedef struct packed {
    logic        hit;      // 1: a message was found and its words follow
    logic        ctrl;     // 1: the words come from the control packets FIFO
    logic [13:0] rsvd;
    logic [15:0] len;      // number of data words that follow (ctrl: plus one header word)
  } lookup_status_t;

endpackage
