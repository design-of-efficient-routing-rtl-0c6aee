// islip_scheduler: iSLIP crossbar scheduler for an N x N switch.
//
// Input i raises req[i][j] when it holds a packet for output j. The
// scheduler computes a conflict-free matching of inputs to outputs with the
// iSLIP request-grant-accept iterations:
//   request: every unmatched input requests every unmatched output it has a
//            packet for;
//   grant:   each output's grant arbiter picks one requesting input,
//            round-robin from its grant pointer;
//   accept:  each input's accept arbiter picks one granting output,
//            round-robin from its accept pointer.
// Inputs and outputs matched in one iteration drop out of the next. Only
// first-iteration results move the pointers: an accept pointer goes to one
// beyond the accepted output, and a grant pointer goes to one beyond the
// granted input only if that grant was accepted.
//
// There are N grant arbiters and N accept arbiters (rr_arbiter), each holding
// its pointer. All ITERATIONS iterations are unrolled and finish in the same
// clock cycle as the request (combinational), as single-cycle arbitration is
// the stated aim; iterations after the first reuse the pointers through extra
// priority encoders. ITERATIONS = N always reaches a maximal matching. The
// pointers update at the rising edge. Reset: active-low, asynchronous.
//
// Outputs: in_match[i] is one-hot over outputs (the output input i won),
// out_match[j] one-hot over inputs; first_iter[i] tells that input i was
// matched in the first iteration, so later matches are visible.
module islip_scheduler #(
  parameter int unsigned N          = 4,
  parameter int unsigned ITERATIONS = N,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N-1:0][N-1:0] req,       // req[input][output]
  output logic [N-1:0][N-1:0] in_match,  // in_match[input][output]
  output logic [N-1:0][N-1:0] out_match, // out_match[output][input]
  output logic [N-1:0]        first_iter
);

  logic [N-1:0][IW-1:0] g_ptr, a_ptr;
  logic [N-1:0]         g_upd, a_upd;
  logic [N-1:0][N-1:0]  g_gnt0;   // first-iteration grants [output][input]
  logic [N-1:0][N-1:0]  a_req0;   // first-iteration grants [input][output]
  logic [N-1:0][N-1:0]  a_acc0;   // first-iteration accepts [input][output]

  for (genvar it = 0; it < ITERATIONS; it++) begin : g_iter
    logic [N-1:0]        in_done, out_done;   // matched before this iteration
    logic [N-1:0]        in_next, out_next;   // matched after it
    logic [N-1:0][N-1:0] g_req;   // [output][input]
    logic [N-1:0][N-1:0] g_gnt;   // [output][input]
    logic [N-1:0][N-1:0] a_req;   // [input][output]
    logic [N-1:0][N-1:0] a_acc;   // [input][output]
    logic [N-1:0][N-1:0] acc_sum; // accepts of this and all earlier iterations

    if (it == 0) begin : g_start
      assign in_done  = '0;
      assign out_done = '0;
    end else begin : g_chain
      assign in_done  = g_iter[it-1].in_next;
      assign out_done = g_iter[it-1].out_next;
    end

    // Request step.
    for (genvar j = 0; j < N; j++) begin : g_reqv
      for (genvar i = 0; i < N; i++) begin : g_reqb
        assign g_req[j][i] = req[i][j] & ~in_done[i] & ~out_done[j];
      end
    end

    // Grant step.
    for (genvar j = 0; j < N; j++) begin : g_grant
      if (it == 0) begin : g_first
        rr_arbiter #(.N(N)) u_garb (
          .clk       (clk),
          .rst_n     (rst_n),
          .req       (g_req[j]),
          .update_en (g_upd[j]),
          .gnt       (g_gnt[j]),
          .gnt_idx   (),
          .any       (),
          .ptr       (g_ptr[j])
        );
      end else begin : g_later
        logic [IW-1:0] idx;
        logic          any;
        ppe #(.N(N)) u_gppe (.req(g_req[j]), .ptr(g_ptr[j]), .gnt_idx(idx), .any(any));
        always_comb begin
          g_gnt[j] = '0;
          if (any) g_gnt[j][idx] = 1'b1;
        end
      end
    end

    // Grants arriving at each input.
    for (genvar i = 0; i < N; i++) begin : g_areqv
      for (genvar j = 0; j < N; j++) begin : g_areqb
        assign a_req[i][j] = g_gnt[j][i];
      end
    end

    // Accept step.
    for (genvar i = 0; i < N; i++) begin : g_accept
      if (it == 0) begin : g_first
        rr_arbiter #(.N(N)) u_aarb (
          .clk       (clk),
          .rst_n     (rst_n),
          .req       (a_req[i]),
          .update_en (a_upd[i]),
          .gnt       (a_acc[i]),
          .gnt_idx   (),
          .any       (),
          .ptr       (a_ptr[i])
        );
      end else begin : g_later
        logic [IW-1:0] idx;
        logic          any;
        ppe #(.N(N)) u_appe (.req(a_req[i]), .ptr(a_ptr[i]), .gnt_idx(idx), .any(any));
        always_comb begin
          a_acc[i] = '0;
          if (any) a_acc[i][idx] = 1'b1;
        end
      end
    end

    // Update the matched sets.
    always_comb begin
      in_next  = in_done;
      out_next = out_done;
      for (int i = 0; i < N; i++) begin
        if (|a_acc[i]) in_next[i] = 1'b1;
        for (int j = 0; j < N; j++)
          if (a_acc[i][j]) out_next[j] = 1'b1;
      end
    end

    if (it == 0) begin : g_sum0
      assign acc_sum = a_acc;
      assign g_gnt0  = g_gnt;
      assign a_req0  = a_req;
      assign a_acc0  = a_acc;
    end else begin : g_sumn
      assign acc_sum = g_iter[it-1].acc_sum | a_acc;
    end
  end

  // Pointer update enables, first iteration only.
  always_comb begin
    for (int i = 0; i < N; i++) a_upd[i] = |a_req0[i];
    for (int j = 0; j < N; j++) begin
      g_upd[j] = 1'b0;
      for (int i = 0; i < N; i++)
        if (g_gnt0[j][i] && a_acc0[i][j]) g_upd[j] = 1'b1;
    end
  end

  // Final matching: the accepts of all iterations.
  assign in_match   = g_iter[ITERATIONS-1].acc_sum;
  assign first_iter = g_iter[0].in_next;
  always_comb begin
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++) out_match[j][i] = in_match[i][j];
  end

  // A matching: at most one output per input and one input per output.
  for (genvar i = 0; i < N; i++) begin : g_chk
    a_one_out: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(in_match[i]));
    a_one_in:  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(out_match[i]));
    a_req_ok:  assert property (@(posedge clk) disable iff (!rst_n) (in_match[i] & ~req[i]) == '0);
  end

endmodule
