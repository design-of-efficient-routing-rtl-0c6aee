// tb_noc_switch: end-to-end check of one mesh switch at position (1, 1).
//
// Destinations are chosen so that each packet leaves by a known port
// (column 2 = east, column 0 = west, row 0 = north, row 2 = south, (1,1) =
// local); a port never gets a packet routed back out of itself. All five inputs
// offer packets with random valid; all five outputs take them with random
// ready. A scoreboard per (input, output) pair requires every packet to leave
// by the XY port, intact, in arrival order, and only while out_ready is high.
// A directed part checks the one-cycle switch latency: a lone packet
// accepted at one edge is on its output line in the next cycle.
module tb_noc_switch;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [4:0] in_valid, in_ready, out_valid, out_ready;
  packet_t    in_pkt [5];
  packet_t    out_pkt [5];

  noc_switch #(.MY_X(1), .MY_Y(1)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_pkt,
                                        .out_valid, .out_ready, .out_pkt);

  packet_t sb [5][5][$];   // [input][output]
  int sent = 0, recv = 0, contention = 0;
  bit run_random = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic packet_t make_pkt(input int src, input int dport, input int seq);
    packet_t p;
    case (dport)
      0: begin p.dst_x = 1; p.dst_y = 1; end
      1: begin p.dst_x = 1; p.dst_y = 0; end
      2: begin p.dst_x = 2; p.dst_y = COORD_W'($urandom_range(3)); end
      3: begin p.dst_x = 1; p.dst_y = COORD_W'(2 + $urandom_range(1)); end
      default: begin p.dst_x = 0; p.dst_y = COORD_W'($urandom_range(3)); end
    endcase
    p.payload = {8'(src), 8'(dport), 16'(seq)};
    return p;
  endfunction

  function automatic int pick_port(input int src);
    int d;
    do d = int'($urandom_range(4)); while (d == src && src != 0);
    return d;
  endfunction

  // Monitor: just before each edge, check the outputs that move at it.
  always @(negedge clk) if (rst_n) begin
    #4;
    for (int j = 0; j < 5; j++) if (out_valid[j]) begin
      automatic int src = int'(out_pkt[j].payload[31:24]);
      checks++;
      if (!out_ready[j]) begin failures++; $display("output %0d valid while not ready", j); end
      else if (src > 4 || sb[src][j].size() == 0 || sb[src][j][0] != out_pkt[j]) begin
        failures++; $display("t=%0t output %0d unexpected packet %h (queue %0d head %h)", $time, j, out_pkt[j], sb[src][j].size(), (sb[src][j].size() != 0) ? sb[src][j][0] : packet_t'(0));
      end else begin
        void'(sb[src][j].pop_front());
        recv++;
      end
    end
  end

  // Input drivers.
  int seq [5];
  int dport [5];
  logic [4:0] take;
  initial begin
    in_valid = '0; out_ready = '0;
    foreach (in_pkt[i]) in_pkt[i] = '0;
    foreach (seq[i]) seq[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // Latency: a lone packet west -> east.
    @(negedge clk);
    out_ready = '1;
    in_pkt[4] = make_pkt(4, 2, 9999); in_valid[4] = 1;
    sb[4][2].push_back(in_pkt[4]); sent++;
    @(posedge clk);  // accepted here
    @(negedge clk);
    in_valid = '0;
    checks++;
    if (!out_valid[2] || out_pkt[2] != sb[4][2][0]) begin
      failures++; $display("one-cycle latency not met");
    end
    @(posedge clk);
    @(negedge clk);
    // Random traffic.
    for (int i = 0; i < 5; i++) begin dport[i] = pick_port(i); in_pkt[i] = make_pkt(i, dport[i], seq[i]); end
    for (int c = 0; c < 4000; c++) begin
      out_ready = 5'($urandom);
      for (int i = 0; i < 5; i++) in_valid[i] = ($urandom_range(3) != 0);
      #1;
      begin
        automatic int want [5] = '{0, 0, 0, 0, 0};
        for (int i = 0; i < 5; i++)
          for (int j = 0; j < 5; j++) if (dut.sched_req[i][j]) want[j]++;
        for (int j = 0; j < 5; j++) if (want[j] > 1) contention++;
      end
      take = in_valid & in_ready;
      @(posedge clk);
      @(negedge clk);
      for (int i = 0; i < 5; i++) if (take[i]) begin
        sb[i][dport[i]].push_back(in_pkt[i]); sent++; seq[i]++;
        dport[i] = pick_port(i); in_pkt[i] = make_pkt(i, dport[i], seq[i]);
      end
    end
    in_valid = '0; out_ready = '1;
    repeat (100) @(posedge clk);
    @(negedge clk);
    for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) begin
      checks++;
      if (sb[i][j].size() != 0) begin failures++; $display("%0d packets %0d->%0d never left", sb[i][j].size(), i, j); end
    end
    checks++;
    if (sent != recv || sent < 1000) begin failures++; $display("sent %0d received %0d", sent, recv); end
    checks++;
    if (contention == 0) begin failures++; $display("no output contention seen"); end
    $display("sent=%0d received=%0d contended output-cycles=%0d", sent, recv, contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
