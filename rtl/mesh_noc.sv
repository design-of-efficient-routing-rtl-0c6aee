// mesh_noc: 2D mesh network-on-chip of iSLIP-scheduled switches.
//
// COLS x ROWS switches (4 x 4 by default) are laid out on a grid; switch
// (x, y) sits at node index n = y*COLS + x, and row 0 is the north edge.
// Neighbouring switches are joined by a pair of opposite point-to-point
// links (east output to the east neighbour's west input, south output to the
// south neighbour's north input, and back). Each switch's local port is the
// resource attachment of node n and is brought out of the module:
// res_in_* injects packets into the network, res_out_* delivers the packets
// addressed to node n. A packet carries its destination (dst_x, dst_y) and
// is routed XY through the mesh, one cycle per switch plus any waiting.
//
// Links on the mesh edge lead nowhere: their inputs are held idle and their
// outputs are never ready. With XY routing a packet never turns toward an
// edge unless its destination lies outside the mesh, so destinations must be
// inside the mesh. The network interface of each resource, which would build
// packets from the resource's own transactions, is not part of this module.
// The 4 x 4 grid of switches, each with one resource, follows the source;
// the edge tie-offs, node numbering and the exposed local ports are this
// design's choices.
module mesh_noc
  import noc_pkg::*;
#(
  parameter int unsigned COLS       = 4,
  parameter int unsigned ROWS       = 4,
  parameter int unsigned DEPTH      = 4,
  parameter int unsigned ITERATIONS = NUM_PORTS,
  localparam int unsigned NODES = COLS * ROWS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NODES-1:0] res_in_valid,
  output logic [NODES-1:0] res_in_ready,
  input  packet_t          res_in_pkt [NODES],
  output logic [NODES-1:0] res_out_valid,
  input  logic [NODES-1:0] res_out_ready,
  output packet_t          res_out_pkt [NODES]
);

  localparam int unsigned P = NUM_PORTS;

  // Per-switch port bundles, indexed [node][port].
  logic [P-1:0] sw_in_valid  [NODES];
  logic [P-1:0] sw_in_ready  [NODES];
  packet_t      sw_in_pkt    [NODES][P];
  logic [P-1:0] sw_out_valid [NODES];
  logic [P-1:0] sw_out_ready [NODES];
  packet_t      sw_out_pkt   [NODES][P];

  for (genvar y = 0; y < ROWS; y++) begin : g_row
    for (genvar x = 0; x < COLS; x++) begin : g_col
      localparam int unsigned N = y * COLS + x;

      noc_switch #(
        .MY_X       (x),
        .MY_Y       (y),
        .DEPTH      (DEPTH),
        .ITERATIONS (ITERATIONS)
      ) u_sw (
        .clk       (clk),
        .rst_n     (rst_n),
        .in_valid  (sw_in_valid[N]),
        .in_ready  (sw_in_ready[N]),
        .in_pkt    (sw_in_pkt[N]),
        .out_valid (sw_out_valid[N]),
        .out_ready (sw_out_ready[N]),
        .out_pkt   (sw_out_pkt[N])
      );

      // Local resource port.
      assign sw_in_valid[N][PORT_LOCAL]  = res_in_valid[N];
      assign sw_in_pkt[N][PORT_LOCAL]    = res_in_pkt[N];
      assign res_in_ready[N]             = sw_in_ready[N][PORT_LOCAL];
      assign res_out_valid[N]            = sw_out_valid[N][PORT_LOCAL];
      assign res_out_pkt[N]              = sw_out_pkt[N][PORT_LOCAL];
      assign sw_out_ready[N][PORT_LOCAL] = res_out_ready[N];

      // North side: from the switch above, or idle on the edge.
      if (y > 0) begin : g_n
        assign sw_in_valid[N][PORT_NORTH]  = sw_out_valid[N-COLS][PORT_SOUTH];
        assign sw_in_pkt[N][PORT_NORTH]    = sw_out_pkt[N-COLS][PORT_SOUTH];
        assign sw_out_ready[N][PORT_NORTH] = sw_in_ready[N-COLS][PORT_SOUTH];
      end else begin : g_n_edge
        assign sw_in_valid[N][PORT_NORTH]  = 1'b0;
        assign sw_in_pkt[N][PORT_NORTH]    = '0;
        assign sw_out_ready[N][PORT_NORTH] = 1'b0;
      end

      // South side.
      if (y < ROWS - 1) begin : g_s
        assign sw_in_valid[N][PORT_SOUTH]  = sw_out_valid[N+COLS][PORT_NORTH];
        assign sw_in_pkt[N][PORT_SOUTH]    = sw_out_pkt[N+COLS][PORT_NORTH];
        assign sw_out_ready[N][PORT_SOUTH] = sw_in_ready[N+COLS][PORT_NORTH];
      end else begin : g_s_edge
        assign sw_in_valid[N][PORT_SOUTH]  = 1'b0;
        assign sw_in_pkt[N][PORT_SOUTH]    = '0;
        assign sw_out_ready[N][PORT_SOUTH] = 1'b0;
      end

      // West side.
      if (x > 0) begin : g_w
        assign sw_in_valid[N][PORT_WEST]  = sw_out_valid[N-1][PORT_EAST];
        assign sw_in_pkt[N][PORT_WEST]    = sw_out_pkt[N-1][PORT_EAST];
        assign sw_out_ready[N][PORT_WEST] = sw_in_ready[N-1][PORT_EAST];
      end else begin : g_w_edge
        assign sw_in_valid[N][PORT_WEST]  = 1'b0;
        assign sw_in_pkt[N][PORT_WEST]    = '0;
        assign sw_out_ready[N][PORT_WEST] = 1'b0;
      end

      // East side.
      if (x < COLS - 1) begin : g_e
        assign sw_in_valid[N][PORT_EAST]  = sw_out_valid[N+1][PORT_WEST];
        assign sw_in_pkt[N][PORT_EAST]    = sw_out_pkt[N+1][PORT_WEST];
        assign sw_out_ready[N][PORT_EAST] = sw_in_ready[N+1][PORT_WEST];
      end else begin : g_e_edge
        assign sw_in_valid[N][PORT_EAST]  = 1'b0;
        assign sw_in_pkt[N][PORT_EAST]    = '0;
        assign sw_out_ready[N][PORT_EAST] = 1'b0;
      end
    end
  end

endmodule
