// tb_crossbar: random permutation and partial-selection check of the
// 5 x 5 crossbar. Each cycle a random partial matching of inputs to outputs
// is applied with random packets; every output must carry exactly the packet
// of its selected input, and an unselected output must be idle.
module tb_crossbar;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  packet_t in_pkt [NUM_PORTS];
  packet_t out_pkt [NUM_PORTS];
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0] sel;
  logic [NUM_PORTS-1:0] out_valid;

  crossbar dut (.in_pkt, .sel, .out_valid, .out_pkt);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int src [NUM_PORTS];
      bit used [NUM_PORTS];
      foreach (used[i]) used[i] = 0;
      foreach (in_pkt[i]) in_pkt[i] = packet_t'({$urandom, $urandom});
      sel = '0;
      for (int j = 0; j < NUM_PORTS; j++) begin
        automatic int i = int'($urandom_range(NUM_PORTS));   // NUM_PORTS means idle
        if (i < NUM_PORTS && !used[i]) begin
          used[i] = 1; src[j] = i; sel[j][i] = 1'b1;
        end else src[j] = -1;
      end
      #1;
      for (int j = 0; j < NUM_PORTS; j++) begin
        checks++;
        if (src[j] < 0) begin
          if (out_valid[j]) begin failures++; $display("output %0d valid while idle", j); end
        end else if (!out_valid[j] || out_pkt[j] != in_pkt[src[j]]) begin
          failures++; $display("output %0d wrong packet", j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
