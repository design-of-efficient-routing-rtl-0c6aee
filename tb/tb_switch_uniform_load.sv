// tb_switch_uniform_load: throughput of one switch under uniform traffic.
//
// A switch at (1,1) has all five inputs offering a packet every cycle
// (100 % offered load), each packet going to one of the four other ports,
// chosen uniformly. Every output is always ready, so each output is loaded
// at 100 % too. After a warm-up of 200 cycles the testbench measures, over
// 5000 cycles, the fraction of output-cycles that carry a packet, and checks
// with a scoreboard that every packet leaves by its port, intact and in
// order. The switch must sustain at least 80 % of the offered load (about 83 % is
// reached with 4-entry queues, see the README on flow control); the
// measured figure is printed.
module tb_switch_uniform_load;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [4:0] in_valid, in_ready, out_valid, out_ready;
  packet_t    in_pkt [5];
  packet_t    out_pkt [5];

  noc_switch #(.MY_X(1), .MY_Y(1)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_pkt,
                                        .out_valid, .out_ready, .out_pkt);

  packet_t sb [5][5][$];
  int sent = 0, recv = 0, busy_out = 0, accepted = 0;
  bit measuring = 0;

  initial begin
    repeat (20000) @(posedge clk);
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
      2: begin p.dst_x = 2; p.dst_y = 1; end
      3: begin p.dst_x = 1; p.dst_y = 2; end
      default: begin p.dst_x = 0; p.dst_y = 1; end
    endcase
    p.payload = {8'(src), 8'(dport), 16'(seq)};
    return p;
  endfunction

  function automatic int pick_port(input int src);
    int d;
    do d = int'($urandom_range(4)); while (d == src);
    return d;
  endfunction

  always @(negedge clk) if (rst_n) begin
    #4;
    for (int j = 0; j < 5; j++) if (out_valid[j]) begin
      automatic int src = int'(out_pkt[j].payload[31:24]);
      checks++;
      if (src > 4 || sb[src][j].size() == 0 || sb[src][j][0] != out_pkt[j]) begin
        failures++; $display("output %0d unexpected packet %h", j, out_pkt[j]);
      end else begin
        void'(sb[src][j].pop_front());
        recv++;
        if (measuring) busy_out++;
      end
    end
  end

  int seq [5];
  int dport [5];
  logic [4:0] take;
  initial begin
    in_valid = '0; out_ready = '1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 5; i++) begin seq[i] = 0; dport[i] = pick_port(i); in_pkt[i] = make_pkt(i, dport[i], 0); end
    in_valid = '1;
    for (int c = 0; c < 5200; c++) begin
      measuring = (c >= 200);
      #1 take = in_valid & in_ready;
      if (measuring) for (int i = 0; i < 5; i++) if (take[i]) accepted++;
      @(posedge clk);
      @(negedge clk);
      for (int i = 0; i < 5; i++) if (take[i]) begin
        sb[i][dport[i]].push_back(in_pkt[i]); sent++; seq[i]++;
        dport[i] = pick_port(i); in_pkt[i] = make_pkt(i, dport[i], seq[i]);
      end
    end
    measuring = 0;
    in_valid = '0;
    repeat (50) @(negedge clk);
    checks++;
    if (sent != recv) begin failures++; $display("sent %0d received %0d", sent, recv); end
    begin
      automatic real thr = real'(busy_out) / (5.0 * 5000.0);
      $display("uniform 100%% load: output utilisation %0.3f, accepted load %0.3f",
               thr, real'(accepted) / (5.0 * 5000.0));
      checks++;
      if (thr < 0.80) begin failures++; $display("throughput below 80%%"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
