// Top level: the two network hardware contributions of the design, side by side.
//
//  * u_ni   : one Tra-NI network interface (transport-layer aware NI) with its kernel
//             ports and its two credit-controlled network links brought out. The
//             wormhole network it was built for, the processor and the local memory are
//             outside this RTL; whatever drives the links and the kernel ports stands in
//             for them.
//  * u_mesh : an 8x8 mesh of minBD deflection routers with maze routing, with per-link
//             fault inputs, a local injection port and two ejection ports per node.
// The two parts share only the clock and reset. They are not joined because the
// deflection mesh delivers the flits of a packet independently and possibly out of
// order, while the interface expects the in-order packets of a wormhole network; the
// design evaluates the two separately. All parameters default to the sizes used in
// the design's evaluations or, where it gives none, to this implementation's choices.
module manycore_top
  import maze_pkg::*;
#(
  parameter int unsigned MESH_X     = 8,
  parameter int unsigned MESH_Y     = 8,
  parameter int unsigned NODES      = MESH_X * MESH_Y
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // Tra-NI kernel ports
  input  logic                         ni_send,
  input  tra_ni_pkg::flit_t            ni_data_in,
  output logic                         ni_send_available,
  input  logic                         ni_lookup,
  output tra_ni_pkg::flit_t            ni_data_out,
  output logic                         ni_read_available,
  input  logic                         ni_read,
  output logic                         ni_interrupt,
  // Tra-NI network links
  output logic                         ni_tx_valid,
  output tra_ni_pkg::flit_t            ni_tx_flit,
  input  logic                         ni_tx_credit,
  input  logic                         ni_rx_valid,
  input  tra_ni_pkg::flit_t            ni_rx_flit,
  output logic                         ni_rx_credit,
  // maze-routing mesh
  input  logic [MESH_Y*(MESH_X-1)-1:0] hlink_broken,
  input  logic [(MESH_Y-1)*MESH_X-1:0] vlink_broken,
  input  logic                         inj_valid [NODES],
  input  flit_t                        inj_flit  [NODES],
  output logic                         inj_ready [NODES],
  output logic [1:0]                   ej_valid  [NODES],
  output flit_t                        ej_flit   [NODES][2],
  output router_ev_t                   ev        [NODES]
);
  tra_ni u_ni (
    .clk, .rst_n,
    .send(ni_send), .data_in(ni_data_in), .send_available(ni_send_available),
    .lookup(ni_lookup), .data_out(ni_data_out), .read_available(ni_read_available),
    .read(ni_read), .interrupt(ni_interrupt),
    .tx_valid(ni_tx_valid), .tx_flit(ni_tx_flit), .tx_credit(ni_tx_credit),
    .rx_valid(ni_rx_valid), .rx_flit(ni_rx_flit), .rx_credit(ni_rx_credit)
  );

  maze_mesh #(.MESH_X(MESH_X), .MESH_Y(MESH_Y)) u_mesh (
    .clk, .rst_n, .hlink_broken, .vlink_broken,
    .inj_valid, .inj_flit, .inj_ready, .ej_valid, .ej_flit, .ev
  );
endmodule
