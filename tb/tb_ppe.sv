// tb_ppe: exhaustive check of the programmable priority encoder.
//
// For N = 4 (the default) and N = 5 (a mesh switch) every request vector is
// tried with every pointer value. The expected winner comes from a circular
// scan starting at the pointer, written independently of the encoder's
// two-encoder structure.
module tb_ppe;
  int checks = 0, failures = 0;

  logic [3:0] req4;  logic [1:0] ptr4;  logic [1:0] idx4;  logic any4;
  logic [4:0] req5;  logic [2:0] ptr5;  logic [2:0] idx5;  logic any5;

  ppe            dut4 (.req(req4), .ptr(ptr4), .gnt_idx(idx4), .any(any4));
  ppe #(.N(5))   dut5 (.req(req5), .ptr(ptr5), .gnt_idx(idx5), .any(any5));

  function automatic int ref_pick(input int n, input int r, input int p);
    for (int k = 0; k < n; k++) if (r[(p + k) % n]) return (p + k) % n;
    return -1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 16; r++)
      for (int p = 0; p < 4; p++) begin
        int e;
        req4 = 4'(r); ptr4 = 2'(p); #1;
        e = ref_pick(4, r, p);
        checks++;
        if (any4 !== (e >= 0) || (e >= 0 && int'(idx4) != e)) begin
          failures++;
          $display("N=4 req=%b ptr=%0d got %0d/%b exp %0d", req4, p, idx4, any4, e);
        end
      end
    for (int r = 0; r < 32; r++)
      for (int p = 0; p < 5; p++) begin
        int e;
        req5 = 5'(r); ptr5 = 3'(p); #1;
        e = ref_pick(5, r, p);
        checks++;
        if (any5 !== (e >= 0) || (e >= 0 && int'(idx5) != e)) begin
          failures++;
          $display("N=5 req=%b ptr=%0d got %0d/%b exp %0d", req5, p, idx5, any5, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
