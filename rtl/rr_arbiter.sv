// rr_arbiter: round-robin arbiter with an update-enabled priority pointer.
//
// A programmable priority encoder picks one of the N requests starting from
// the stored priority pointer; a decoder turns its index into the one-hot
// grant. The pointer register is reloaded through a two-way mux: with
// update_en low it holds its value, with update_en high (and a winner
// present) it takes the winner's index plus one, modulo N, so that the input
// just served gets the lowest priority next time. This is the arbiter
// schematic of the source; the iSLIP scheduler drives update_en only when a
// first-iteration grant is accepted.
//
// Timing: gnt / gnt_idx are combinational from req and the pointer; the
// pointer changes at the rising clock edge after update_en. Reset (active
// low, asynchronous; this design's choice) sets the pointer to 0.
// ptr exposes the pointer so that further matching iterations can share it.
module rr_arbiter #(
  parameter int unsigned N  = 4,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic          update_en,
  output logic [N-1:0]  gnt,       // one-hot grant
  output logic [IW-1:0] gnt_idx,
  output logic          any,
  output logic [IW-1:0] ptr
);

  logic [IW-1:0] priority_q;
  logic [IW-1:0] next_ptr;

  ppe #(.N(N)) u_ppe (
    .req     (req),
    .ptr     (priority_q),
    .gnt_idx (gnt_idx),
    .any     (any)
  );

  // Decoder: index to one-hot, gated by "any request".
  always_comb begin
    gnt = '0;
    if (any) gnt[gnt_idx] = 1'b1;
  end

  // Incrementer, modulo N.
  assign next_ptr = (32'(gnt_idx) == N - 1) ? '0 : gnt_idx + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 priority_q <= '0;
    else if (update_en && any)  priority_q <= next_ptr;
  end

  assign ptr = priority_q;

endmodule
