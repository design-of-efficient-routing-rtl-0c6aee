// ppe: programmable priority encoder.
//
// Given an N-bit request vector and a priority pointer, returns the index of
// the first request found when scanning from the pointer upwards and wrapping
// round: req[ptr] wins if set, else the lowest set index above ptr, else the
// lowest set index below ptr. This is the round-robin selection rule used by
// every grant and accept arbiter of the iSLIP scheduler.
//
// Structure (after the thermometer-coded design the source cites): a
// thermometer mask keeps only the requests at or above the pointer; one
// simple (fixed-priority, lowest index first) encoder works on the masked
// requests and a second on all requests. The masked result wins whenever the
// masked vector is non-empty. Purely combinational.
//
// Ports: req (N), ptr (index), gnt_idx (index of the winner, 0 if none),
// any (at least one request; the inverse of the optional NoReq output).
module ppe #(
  parameter int unsigned N  = 4,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  req,
  input  logic [IW-1:0] ptr,
  output logic [IW-1:0] gnt_idx,
  output logic          any
);

  logic [N-1:0]  thermo;       // thermo[k] = (k >= ptr)
  logic [N-1:0]  req_masked;
  logic [IW-1:0] idx_masked, idx_plain;
  logic          any_masked, any_plain;

  always_comb begin
    for (int unsigned k = 0; k < N; k++) thermo[k] = (k >= ptr);
  end

  assign req_masked = req & thermo;

  // Simple priority encoder on the masked requests.
  always_comb begin
    idx_masked = '0;
    any_masked = 1'b0;
    for (int k = N - 1; k >= 0; k--) begin
      if (req_masked[k]) begin
        idx_masked = IW'(k);
        any_masked = 1'b1;
      end
    end
  end

  // Simple priority encoder on the unmasked requests.
  always_comb begin
    idx_plain = '0;
    any_plain = 1'b0;
    for (int k = N - 1; k >= 0; k--) begin
      if (req[k]) begin
        idx_plain = IW'(k);
        any_plain = 1'b1;
      end
    end
  end

  assign gnt_idx = any_masked ? idx_masked : idx_plain;
  assign any     = any_plain;

endmodule
