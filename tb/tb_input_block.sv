// tb_input_block: checks the virtual-output-queue input buffer.
//
// Packets with random destinations (0..4) are offered with random valid and
// taken with a random one-hot deq restricted to non-empty queues. A model
// keeps one FIFO per output: req must equal "model queue non-empty",
// in_ready must equal "no model queue full" (DEPTH = 4), head_pkt must be the
// model queue's head on a dequeue, and order must be kept per queue. A
// directed part fills one queue to show that a full queue stops input while
// packets for another output still leave (no head-of-line blocking).
module tb_input_block;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid, in_ready;
  packet_t    in_pkt, head_pkt;
  logic [2:0] in_dest;
  logic [4:0] req, deq;
  int full_seen = 0;

  input_block dut (.clk, .rst_n, .in_valid, .in_ready, .in_pkt, .in_dest, .req, .deq, .head_pkt);

  packet_t q [5][$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input bit v, input int dest, input int dq);
    logic [4:0] exp_req;
    bit exp_ready;
    in_valid = v;
    in_dest  = 3'(dest);
    in_pkt   = packet_t'({$urandom, $urandom});
    deq      = (dq >= 0) ? (5'b1 << dq) : '0;
    #1;
    exp_ready = 1;
    for (int k = 0; k < 5; k++) begin
      exp_req[k] = (q[k].size() != 0);
      if (q[k].size() == 4) exp_ready = 0;
    end
    if (!exp_ready) full_seen++;
    checks++;
    if (req != exp_req || in_ready != exp_ready) begin
      failures++; $display("req=%b exp %b ready=%b exp %b", req, exp_req, in_ready, exp_ready);
    end
    if (dq >= 0) begin
      checks++;
      if (head_pkt != q[dq][0]) begin failures++; $display("queue %0d head mismatch", dq); end
    end
    @(posedge clk);
    if (dq >= 0) void'(q[dq].pop_front());
    if (v && exp_ready) q[dest].push_back(in_pkt);
    @(negedge clk);
  endtask

  initial begin
    in_valid = 0; deq = 0; in_dest = 0; in_pkt = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < 3000; c++) begin
      automatic int dq = -1;
      if ($urandom_range(2) == 0) begin
        automatic int k = int'($urandom_range(4));
        if (q[k].size() != 0) dq = k;
      end
      step(1'($urandom_range(3) != 0), int'($urandom_range(4)), dq);
    end
    // Drain.
    for (int k = 0; k < 5; k++) while (q[k].size() != 0) step(0, 0, k);
    // Fill queue 2 to the brim; queue 3 holds one packet.
    step(1, 3, -1);
    for (int n = 0; n < 4; n++) step(1, 2, -1);
    checks++;
    if (in_ready) begin failures++; $display("full queue did not stop the input"); end
    step(1, 1, 3);                  // refused, but queue 3 still drains
    checks++;
    if (q[1].size() != 0 || q[3].size() != 0) begin failures++; $display("blocking behaviour wrong"); end
    checks++;
    if (full_seen == 0) begin failures++; $display("queue never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
