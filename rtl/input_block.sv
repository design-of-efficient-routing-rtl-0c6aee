// input_block: switch input buffer organised as virtual output queues (VOQs).
//
// An arriving packet is written into the FIFO kept for its output port
// (in_dest, computed by the route logic in front of this block), so a packet
// held up for a busy output never blocks packets for other outputs. Every
// non-empty VOQ raises its bit of req towards the scheduler. When the
// scheduler matches this input to output j, deq is one-hot at bit j in that
// same cycle: the head of VOQ j appears on head_pkt and is removed at the
// clock edge.
//
// Flow control is valid/ready. in_ready is high only while no VOQ is full, so
// it depends on stored state alone and never on the arriving packet; this
// keeps the ready path free of combinational loops between switches, at the
// price of refusing a packet whose own VOQ has room while another is full.
// Each VOQ holds DEPTH packets. The source gives neither depth nor flow
// control; both are this design's choices. Reset: active-low, asynchronous,
// empties every queue.
module input_block
  import noc_pkg::*;
#(
  parameter int unsigned NPORTS = NUM_PORTS,
  parameter int unsigned DEPTH  = 4,
  localparam int unsigned PW = (NPORTS > 1) ? $clog2(NPORTS) : 1,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  packet_t           in_pkt,
  input  logic [PW-1:0]     in_dest,
  output logic [NPORTS-1:0] req,
  input  logic [NPORTS-1:0] deq,       // one-hot or zero
  output packet_t           head_pkt
);

  packet_t         mem   [NPORTS][DEPTH];
  logic [AW-1:0]   wr_ptr[NPORTS];
  logic [AW-1:0]   rd_ptr[NPORTS];
  logic [AW:0]     count [NPORTS];
  logic [NPORTS-1:0] full;

  always_comb begin
    for (int q = 0; q < int'(NPORTS); q++) begin
      req[q]  = (count[q] != '0);
      full[q] = (32'(count[q]) == DEPTH);
    end
  end

  assign in_ready = ~|full;

  logic push_any;
  assign push_any = in_valid & in_ready;

  always_comb begin
    head_pkt = '0;
    for (int q = 0; q < int'(NPORTS); q++)
      if (deq[q]) head_pkt = head_pkt | mem[q][rd_ptr[q]];
  end

  // Packet storage: written only, never reset.
  always_ff @(posedge clk) begin
    if (push_any) mem[in_dest][wr_ptr[in_dest]] <= in_pkt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < int'(NPORTS); q++) begin
        wr_ptr[q] <= '0;
        rd_ptr[q] <= '0;
        count[q]  <= '0;
      end
    end else begin
      for (int q = 0; q < int'(NPORTS); q++) begin
        logic push, pop;
        push = push_any && (32'(in_dest) == q);
        pop  = deq[q] && req[q];
        if (push) wr_ptr[q] <= (32'(wr_ptr[q]) == DEPTH - 1) ? '0 : wr_ptr[q] + 1'b1;
        if (pop)  rd_ptr[q] <= (32'(rd_ptr[q]) == DEPTH - 1) ? '0 : rd_ptr[q] + 1'b1;
        count[q] <= count[q] + (AW+1)'(push) - (AW+1)'(pop);
      end
    end
  end

  a_deq_onehot:  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(deq));
  a_deq_nonempty: assert property (@(posedge clk) disable iff (!rst_n) (deq & ~req) == '0);
  a_dest_range:  assert property (@(posedge clk) disable iff (!rst_n)
                                  in_valid |-> 32'(in_dest) < NPORTS);

endmodule
