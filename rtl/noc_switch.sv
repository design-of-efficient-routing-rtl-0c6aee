// noc_switch: five-port 2D mesh router with an iSLIP-scheduled crossbar.
//
// Ports are numbered by noc_pkg::port_e: 0 local resource, 1 north, 2 east,
// 3 south, 4 west. Each input line feeds an input block that keeps one
// virtual output queue (VOQ) per output; the XY route logic in front of it
// chooses the VOQ when a packet arrives. Every cycle the iSLIP scheduler sees
// req[i][j] = (VOQ j of input i holds a packet) and (output j is ready), and
// returns a matching in the same cycle. Each matched input pops the head of
// its VOQ, and the crossbar drives it onto the output line with out_valid.
// Output lines have no buffers.
//
// Timing: a packet accepted at edge t (in_valid & in_ready) sits in its VOQ
// from then on; if it wins the scheduling in the next cycle it is on out_pkt
// in that cycle and is in the next switch's VOQ at edge t+2. So a switch
// adds one cycle per hop when uncontended.
//
// Links use valid/ready: a packet moves at an edge where out_valid and
// out_ready are both high. out_valid is only raised on an output whose ready
// is already high, and it depends combinationally on out_ready; in_ready
// comes from stored state only (no VOQ full), so chained switches form no
// combinational loop. The switch position MY_X / MY_Y is a parameter.
// Five ports and the scheduler structure follow the source; the VOQ depth,
// XY routing and the flow control are this design's choices.
module noc_switch
  import noc_pkg::*;
#(
  parameter int unsigned MY_X       = 0,
  parameter int unsigned MY_Y       = 0,
  parameter int unsigned DEPTH      = 4,
  parameter int unsigned ITERATIONS = NUM_PORTS,
  localparam int unsigned P  = NUM_PORTS,
  localparam int unsigned PW = $clog2(NUM_PORTS)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [P-1:0] in_valid,
  output logic [P-1:0] in_ready,
  input  packet_t      in_pkt [P],
  output logic [P-1:0] out_valid,
  input  logic [P-1:0] out_ready,
  output packet_t      out_pkt [P]
);

  logic [P-1:0][P-1:0] voq_busy;    // [input][output]
  logic [P-1:0][P-1:0] sched_req;   // [input][output]
  logic [P-1:0][P-1:0] in_match;    // [input][output]
  logic [P-1:0][P-1:0] out_match;   // [output][input]
  logic [P-1:0]        first_iter;
  packet_t             head_pkt [P];

  for (genvar i = 0; i < P; i++) begin : g_in
    port_e route;

    xy_route u_route (
      .cur_x    (COORD_W'(MY_X)),
      .cur_y    (COORD_W'(MY_Y)),
      .dst_x    (in_pkt[i].dst_x),
      .dst_y    (in_pkt[i].dst_y),
      .out_port (route)
    );

    input_block #(.NPORTS(P), .DEPTH(DEPTH)) u_ib (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid[i]),
      .in_ready (in_ready[i]),
      .in_pkt   (in_pkt[i]),
      .in_dest  (PW'(route)),
      .req      (voq_busy[i]),
      .deq      (in_match[i]),
      .head_pkt (head_pkt[i])
    );

    assign sched_req[i] = voq_busy[i] & out_ready;
  end

  islip_scheduler #(.N(P), .ITERATIONS(ITERATIONS)) u_sched (
    .clk        (clk),
    .rst_n      (rst_n),
    .req        (sched_req),
    .in_match   (in_match),
    .out_match  (out_match),
    .first_iter (first_iter)
  );

  crossbar #(.N(P)) u_xbar (
    .in_pkt    (head_pkt),
    .sel       (out_match),
    .out_valid (out_valid),
    .out_pkt   (out_pkt)
  );

  for (genvar j = 0; j < P; j++) begin : g_chk
    a_valid_needs_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                          out_valid[j] |-> out_ready[j]);
  end

endmodule
