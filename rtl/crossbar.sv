// crossbar: N x N crossbar matrix of the switch.
//
// Connects each output line to at most one input block, as the scheduler's
// decision says: sel[j] is one-hot over the inputs (all zero leaves output j
// idle). Output j carries the packet of the selected input and out_valid[j]
// is high while an input is selected. The outputs need no buffers because at
// most one input drives each of them. Built as an AND-OR multiplexer per
// output; purely combinational, so a packet crosses in the cycle it is
// scheduled and is taken by the next switch at the following clock edge.
// The crossbar and its unbuffered outputs follow the source's switch
// description; the AND-OR form and the select encoding are this design's.
module crossbar
  import noc_pkg::*;
#(
  parameter int unsigned N = NUM_PORTS
) (
  input  packet_t           in_pkt [N],
  input  logic [N-1:0][N-1:0] sel,      // sel[output][input]
  output logic [N-1:0]      out_valid,
  output packet_t           out_pkt [N]
);

  always_comb begin
    for (int j = 0; j < int'(N); j++) begin
      out_pkt[j]   = '0;
      out_valid[j] = |sel[j];
      for (int i = 0; i < int'(N); i++)
        if (sel[j][i]) out_pkt[j] = out_pkt[j] | in_pkt[i];
    end
  end

endmodule
