// tb_mesh_noc: end-to-end test of the 4 x 4 mesh at its default parameters.
//
// Every resource injects packets carrying (source, sequence number) in the
// payload; a scoreboard per (source, destination) pair requires each packet
// to reach its destination's resource port exactly once, intact and in
// order (XY routing over FIFO queues keeps a pair's packets in order).
// Phases:
//   1. latency: one packet from (0,0) to (3,3) must be delivered exactly
//      hops + 1 = 7 cycles after the edge that accepted it;
//   2. uniform random traffic, heavy load, ejection ports randomly not ready;
//   3. hotspot: every node sends to node (2,1), which saturates its links;
//   4. drain, then every scoreboard queue must be empty.
// Mechanisms that must each happen at least once (counted from the switches'
// internal signals): injection refused (input buffer full), two or more
// inputs of a switch wanting the same output (contention), a match made in a
// later iSLIP iteration, ejection stalled by the resource, and a switch link
// held up by a full downstream buffer.
module tb_mesh_noc;
  import noc_pkg::*;
  localparam int C = 4, R = 4, NN = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NN-1:0] res_in_valid, res_in_ready, res_out_valid, res_out_ready;
  packet_t       res_in_pkt [NN];
  packet_t       res_out_pkt [NN];

  mesh_noc dut (.clk, .rst_n, .res_in_valid, .res_in_ready, .res_in_pkt,
                .res_out_valid, .res_out_ready, .res_out_pkt);

  packet_t sb [NN][NN][$];   // [source][destination]
  int sent = 0, recv = 0;
  int cyc = 0;
  int n_refused = 0, n_contend = 0, n_late = 0, n_eject_stall = 0, n_link_stall = 0;

  always @(posedge clk) cyc++;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, one set per switch.
  for (genvar y = 0; y < R; y++) begin : g_my
    for (genvar x = 0; x < C; x++) begin : g_mx
      always @(negedge clk) if (rst_n) begin
        #4;
        for (int j = 0; j < 5; j++) begin
          automatic int want = 0;
          automatic int busy = 0;
          for (int i = 0; i < 5; i++) begin
            if (dut.g_row[y].g_col[x].u_sw.sched_req[i][j]) want++;
            if (dut.g_row[y].g_col[x].u_sw.voq_busy[i][j]) busy++;
          end
          if (want > 1) n_contend++;
          if (busy > 0 && !dut.g_row[y].g_col[x].u_sw.out_ready[j]) begin
            if (j == 0) n_eject_stall++;
            else if ((j == 1 && y > 0) || (j == 3 && y < R - 1) ||
                     (j == 2 && x < C - 1) || (j == 4 && x > 0)) n_link_stall++;
          end
        end
        for (int i = 0; i < 5; i++)
          if (|dut.g_row[y].g_col[x].u_sw.in_match[i] && !dut.g_row[y].g_col[x].u_sw.first_iter[i])
            n_late++;
      end
    end
  end

  // Delivery monitor, just before each edge.
  logic [NN-1:0] deliver_seen;
  int first_delivery_cycle = -1;
  always @(negedge clk) if (rst_n) begin
    #4;
    for (int d = 0; d < NN; d++) if (res_out_valid[d] && res_out_ready[d]) begin
      automatic int src = int'(res_out_pkt[d].payload[31:24]);
      checks++;
      if (int'(res_out_pkt[d].dst_x) != d % C || int'(res_out_pkt[d].dst_y) != d / C) begin
        failures++; $display("node %0d got a packet for (%0d,%0d)", d, res_out_pkt[d].dst_x, res_out_pkt[d].dst_y);
      end else if (src >= NN || sb[src][d].size() == 0 || sb[src][d][0] != res_out_pkt[d]) begin
        failures++; $display("node %0d unexpected packet %h", d, res_out_pkt[d]);
      end else begin
        void'(sb[src][d].pop_front());
        recv++;
        if (first_delivery_cycle < 0) first_delivery_cycle = cyc + 1;  // edge that moves it
      end
    end
  end

  int seq [NN];
  int dst [NN];
  logic [NN-1:0] take;

  function automatic packet_t make_pkt(input int s, input int d, input int q);
    packet_t p;
    p.dst_x = COORD_W'(d % C);
    p.dst_y = COORD_W'(d / C);
    p.payload = {8'(s), 24'(q)};
    return p;
  endfunction

  // Drive one cycle: valid from vmask, ejection ready from rmask.
  task automatic cycle(input logic [NN-1:0] vmask, input logic [NN-1:0] rmask, input int hotspot);
    res_in_valid  = vmask;
    res_out_ready = rmask;
    #1;
    take = res_in_valid & res_in_ready;
    for (int s = 0; s < NN; s++) if (res_in_valid[s] && !res_in_ready[s]) n_refused++;
    @(posedge clk);
    @(negedge clk);
    for (int s = 0; s < NN; s++) if (take[s]) begin
      sb[s][dst[s]].push_back(res_in_pkt[s]); sent++; seq[s]++;
      dst[s] = (hotspot >= 0) ? hotspot : int'($urandom_range(NN - 1));
      res_in_pkt[s] = make_pkt(s, dst[s], seq[s]);
    end
  endtask

  initial begin
    res_in_valid = '0; res_out_ready = '1;
    foreach (seq[s]) begin seq[s] = 0; dst[s] = 0; res_in_pkt[s] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);

    // 1. Latency, corner to corner.
    begin
      int t0;
      dst[0] = 15; res_in_pkt[0] = make_pkt(0, 15, 0);
      cycle(16'h0001, '1, -1);
      t0 = cyc;
      res_in_valid = '0;
      repeat (20) @(negedge clk);
      checks++;
      if (first_delivery_cycle - t0 != 7) begin
        failures++; $display("corner-to-corner latency %0d cycles, expected 7", first_delivery_cycle - t0);
      end
      $display("corner-to-corner latency: %0d cycles", first_delivery_cycle - t0);
    end

    // 2. Uniform random traffic.
    foreach (dst[s]) begin dst[s] = int'($urandom_range(NN - 1)); res_in_pkt[s] = make_pkt(s, dst[s], seq[s]); end
    for (int c = 0; c < 3000; c++) begin
      logic [NN-1:0] v, r;
      for (int s = 0; s < NN; s++) begin
        v[s] = ($urandom_range(99) < 60);
        r[s] = ($urandom_range(99) < 85);
      end
      cycle(v, r, -1);
    end

    // 3. Hotspot on node 6 = (2,1).
    foreach (dst[s]) begin dst[s] = 6; res_in_pkt[s] = make_pkt(s, 6, seq[s]); end
    for (int c = 0; c < 600; c++) cycle('1, '1, 6);

    // 4. Drain.
    res_in_valid = '0; res_out_ready = '1;
    repeat (500) @(negedge clk);
    for (int s = 0; s < NN; s++) for (int d = 0; d < NN; d++) begin
      checks++;
      if (sb[s][d].size() != 0) begin failures++; $display("%0d packets %0d->%0d lost", sb[s][d].size(), s, d); end
    end
    checks++;
    if (sent != recv) begin failures++; $display("sent %0d received %0d", sent, recv); end

    $display("sent=%0d delivered=%0d", sent, recv);
    $display("refused injections=%0d contended outputs=%0d later-iteration matches=%0d ejection stalls=%0d link stalls=%0d",
             n_refused, n_contend, n_late, n_eject_stall, n_link_stall);
    checks++; if (n_refused == 0)     begin failures++; $display("no injection was refused"); end
    checks++; if (n_contend == 0)     begin failures++; $display("no output contention"); end
    checks++; if (n_late == 0)        begin failures++; $display("no later-iteration match"); end
    checks++; if (n_eject_stall == 0) begin failures++; $display("no ejection stall"); end
    checks++; if (n_link_stall == 0)  begin failures++; $display("no link stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
