// tb_rr_arbiter: random check of the round-robin arbiter against a model.
//
// Random request vectors and update enables are applied for 2000 cycles.
// The model keeps its own pointer: the grant must be the first request at or
// after it (circularly), one-hot, in the same cycle; after an edge with
// update_en and a request the pointer must be one beyond the winner, and it
// must hold otherwise. A directed part checks that a lone persistent
// requester is granted every cycle and that all four always-on requesters
// are served in turn (one grant per cycle, each input once per 4 cycles).
module tb_rr_arbiter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [3:0] req, gnt;
  logic       upd, any;
  logic [1:0] idx, ptr;
  int         mptr;

  rr_arbiter dut (.clk, .rst_n, .req, .update_en(upd), .gnt, .gnt_idx(idx), .any, .ptr);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pick(input logic [3:0] r, input int p);
    for (int k = 0; k < 4; k++) if (r[(p + k) % 4]) return (p + k) % 4;
    return -1;
  endfunction

  task automatic check_cycle();
    int e;
    #1;
    e = pick(req, mptr);
    checks++;
    if (int'(ptr) != mptr) begin
      failures++; $display("ptr %0d exp %0d", ptr, mptr);
    end
    checks++;
    if (e < 0 ? (gnt != 0 || any) : (gnt != (4'b1 << e) || !any)) begin
      failures++; $display("req=%b ptr=%0d gnt=%b exp idx %0d", req, mptr, gnt, e);
    end
    @(posedge clk);
    if (upd && e >= 0) mptr = (e + 1) % 4;
  endtask

  initial begin
    req = 0; upd = 0; mptr = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < 2000; c++) begin
      req = 4'($urandom);
      upd = 1'($urandom);
      check_cycle();
      @(negedge clk);
    end
    // Lone requester: granted every cycle.
    req = 4'b0100; upd = 1;
    for (int c = 0; c < 4; c++) begin
      check_cycle();
      checks++;
      if (gnt != 4'b0100) begin failures++; $display("lone requester not granted"); end
      @(negedge clk);
    end
    // All requesting: served in strict rotation, one per cycle.
    req = 4'b1111;
    begin
      automatic int served[4] = '{0, 0, 0, 0};
      for (int c = 0; c < 8; c++) begin
        #1 served[idx]++;
        check_cycle();
        @(negedge clk);
      end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (served[k] != 2) begin failures++; $display("input %0d served %0d times", k, served[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
