// tb_islip_scheduler: checks the iSLIP scheduler against a cycle model.
//
// Three schedulers see the same request matrix: the default 4 x 4 with four
// iterations, a 4 x 4 with a single iteration, and a 5 x 5 (mesh switch
// size) with five. The testbench keeps its own grant and accept pointers and
// runs request-grant-accept in software each cycle; the matching and the
// pointer movement (first iteration only, grant pointer only on acceptance)
// must agree exactly. Random traffic runs first, then saturation: every
// input requests every output. Under saturation the single-iteration
// scheduler's pointers must fall out of step within a few cycles so that
// every cycle matches all four inputs (full throughput), and every matching
// of the multi-iteration schedulers must be maximal. Finally three request
// pairs are held up under heavy random competition and each must be served
// within N*N cycles (no starvation). The decision is checked
// in the same cycle as the request (single-cycle arbitration).
module tb_islip_scheduler;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0][3:0] req4, m4a, m4b, om4a, om4b;
  logic [3:0]      f4a, f4b;
  logic [4:0][4:0] req5, m5, om5;
  logic [4:0]      f5;

  islip_scheduler                   dut_a (.clk, .rst_n, .req(req4), .in_match(m4a), .out_match(om4a), .first_iter(f4a));
  islip_scheduler #(.ITERATIONS(1)) dut_b (.clk, .rst_n, .req(req4), .in_match(m4b), .out_match(om4b), .first_iter(f4b));
  islip_scheduler #(.N(5))          dut_c (.clk, .rst_n, .req(req5), .in_match(m5),  .out_match(om5),  .first_iter(f5));

  // Software model state: [model][port].
  int gp [3][5];
  int ap [3][5];
  int late_matches = 0;
  logic m_a00, m_a23, m_b00, m_b23, m_c14;   // sampled decisions for the held pairs

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One time slot of iSLIP in software. r[i][j]: input i requests output j.
  // Returns acc[i] = matched output or -1, and updates the pointers.
  task automatic model(input int k, input int n, input int iters,
                       input bit r [5][5], output int acc [5], output int first_cnt);
    bit in_m [5], out_m [5];
    int g [5];
    first_cnt = 0;
    for (int i = 0; i < 5; i++) begin acc[i] = -1; in_m[i] = 0; out_m[i] = 0; end
    for (int it = 0; it < iters; it++) begin
      for (int j = 0; j < n; j++) begin
        g[j] = -1;
        if (!out_m[j])
          for (int s = 0; s < n; s++) begin
            int i = (gp[k][j] + s) % n;
            if (r[i][j] && !in_m[i]) begin g[j] = i; break; end
          end
      end
      for (int i = 0; i < n; i++) begin
        if (in_m[i]) continue;
        for (int s = 0; s < n; s++) begin
          int j = (ap[k][i] + s) % n;
          if (g[j] == i) begin
            acc[i] = j;
            in_m[i] = 1; out_m[j] = 1;
            if (it == 0) begin
              first_cnt++;
              ap[k][i] = (j + 1) % n;
              gp[k][j] = (i + 1) % n;
            end
            break;
          end
        end
      end
    end
  endtask

  task automatic compare(input int k, input int n, input logic [4:0][4:0] got, input int acc [5],
                         input bit r [5][5], input bit need_max);
    for (int i = 0; i < n; i++) begin
      logic [4:0] exp_row = '0;
      if (acc[i] >= 0) exp_row[acc[i]] = 1'b1;
      checks++;
      if (got[i] != exp_row) begin
        failures++;
        $display("model %0d input %0d got %b exp %b", k, i, got[i], exp_row);
      end
    end
    if (need_max) begin
      bit om [5];
      for (int j = 0; j < 5; j++) om[j] = 0;
      for (int i = 0; i < n; i++) if (acc[i] >= 0) om[acc[i]] = 1;
      checks++;
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++)
          if (r[i][j] && acc[i] < 0 && !om[j]) begin
            failures++; $display("model %0d not maximal at (%0d,%0d)", k, i, j);
          end
    end
  endtask

  bit hold = 0;   // keep req4[0][0], req4[2][3] and req5[1][4] raised
  task automatic run_cycle(input bit sat, output int matched_b);
    bit r4 [5][5], r5 [5][5];
    int acc [5], fc;
    for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) begin
      r4[i][j] = (i < 4 && j < 4) ? (sat ? 1'b1 : 1'($urandom_range(2) == 0)) : 1'b0;
      r5[i][j] = sat ? 1'b1 : 1'($urandom_range(1));
    end
    if (hold) begin r4[0][0] = 1; r4[2][3] = 1; r5[1][4] = 1; end
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) req4[i][j] = r4[i][j];
    for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) req5[i][j] = r5[i][j];
    #1;
    begin
      logic [4:0][4:0] g;
      g = '0; for (int i = 0; i < 4; i++) g[i][3:0] = m4a[i];
      model(0, 4, 4, r4, acc, fc);
      compare(0, 4, g, acc, r4, 1);
      for (int i = 0; i < 4; i++) if (acc[i] >= 0 && !f4a[i]) late_matches++;
      g = '0; for (int i = 0; i < 4; i++) g[i][3:0] = m4b[i];
      model(1, 4, 1, r4, acc, fc);
      compare(1, 4, g, acc, r4, 0);
      matched_b = fc;
      model(2, 5, 5, r5, acc, fc);
      compare(2, 5, m5, acc, r5, 1);
      m_a00 = m4a[0][0]; m_a23 = m4a[2][3];
      m_b00 = m4b[0][0]; m_b23 = m4b[2][3];
      m_c14 = m5[1][4];
    end
    @(negedge clk);
  endtask

  initial begin
    int mb;
    for (int k = 0; k < 3; k++) for (int p = 0; p < 5; p++) begin gp[k][p] = 0; ap[k][p] = 0; end
    req4 = '0; req5 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < 3000; c++) run_cycle(0, mb);
    checks++;
    if (late_matches == 0) begin failures++; $display("no match ever made after the first iteration"); end
    // Starvation: three pairs keep requesting under heavy random competition
    // (other requests raised with probability 2/3); each must be served
    // within N*N cycles, for every configuration.
    begin
      automatic int wait_a [2] = '{0, 0};
      automatic int wait_b [2] = '{0, 0};
      automatic int wait_c = 0, worst = 0;
      hold = 1;
      for (int c = 0; c < 3000; c++) begin
        run_cycle(0, mb);
        // m_* hold the held pairs' decisions sampled inside run_cycle.
        wait_a[0] = m_a00 ? 0 : wait_a[0] + 1;
        wait_a[1] = m_a23 ? 0 : wait_a[1] + 1;
        wait_b[0] = m_b00 ? 0 : wait_b[0] + 1;
        wait_b[1] = m_b23 ? 0 : wait_b[1] + 1;
        wait_c    = m_c14 ? 0 : wait_c + 1;
        foreach (wait_a[k]) begin
          if (wait_a[k] > worst) worst = wait_a[k];
          if (wait_b[k] > worst) worst = wait_b[k];
        end
        if (wait_c > worst) worst = wait_c;
        checks++;
        if (wait_a[0] > 16 || wait_a[1] > 16 || wait_b[0] > 16 || wait_b[1] > 16 || wait_c > 25) begin
          failures++; $display("starvation at cycle %0d", c);
        end
      end
      hold = 0;
      $display("longest wait of a persistent request: %0d cycles", worst);
    end
    // Saturation: the single-iteration scheduler must reach a full matching
    // every cycle within 8 cycles and stay there.
    begin
      automatic int full_from = -1;
      for (int c = 0; c < 40; c++) begin
        run_cycle(1, mb);
        if (mb == 4 && full_from < 0) full_from = c;
        if (full_from >= 0) begin
          checks++;
          if (mb != 4) begin failures++; $display("saturation cycle %0d matched %0d", c, mb); end
        end
      end
      checks++;
      if (full_from < 0 || full_from > 8) begin
        failures++; $display("single iteration never reached a full matching (%0d)", full_from);
      end
      $display("saturated 1-iteration iSLIP: full matching every cycle from cycle %0d", full_from);
    end
    $display("matches made after the first iteration: %0d", late_matches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
