// tb_pass_net: random pass-gate networks checked against a reference
// connected-component search. 10 nodes, 14 random edges, random edge
// states and random 0/1 drivers per trial; val, driven, conflict and
// converged are compared for every node.
module tb_pass_net;
  localparam int unsigned N = 10;
  localparam int unsigned E = 14;

  function automatic logic [E-1:0][15:0] mk_end(input int unsigned seed);
    logic [E-1:0][15:0] r;
    for (int unsigned e = 0; e < E; e++)
      r[e] = 16'(((e * 7 + seed) * 13 + e * e) % N);
    return r;
  endfunction

  localparam logic [E-1:0][15:0] EA = mk_end(1);
  localparam logic [E-1:0][15:0] EB = mk_end(4);

  logic [E-1:0] en;
  logic [N-1:0] drv1, drv0, val, driven, conflict;
  logic         converged;
  int           checks = 0, failures = 0;

  pass_net #(.N(N), .E(E), .EA(EA), .EB(EB)) dut (
    .en(en), .drv1(drv1), .drv0(drv0),
    .val(val), .driven(driven), .conflict(conflict), .converged(converged)
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int trial = 0; trial < 300; trial++) begin
      int comp [N];
      logic [N-1:0] e1, e0;
      bit changed;
      en   = E'($urandom);
      drv1 = '0; drv0 = '0;
      for (int n = 0; n < N; n++) begin
        int r;
        r = $urandom_range(0, 5);
        if (r == 0) drv1[n] = 1'b1;
        if (r == 1) drv0[n] = 1'b1;
      end
      // reference: label propagation to the minimum node id
      for (int n = 0; n < N; n++) comp[n] = n;
      changed = 1;
      while (changed) begin
        changed = 0;
        for (int e = 0; e < E; e++)
          if (en[e]) begin
            int a, b;
            a = int'(EA[e]); b = int'(EB[e]);
            if (comp[a] < comp[b]) begin comp[b] = comp[a]; changed = 1; end
            else if (comp[b] < comp[a]) begin comp[a] = comp[b]; changed = 1; end
          end
      end
      e1 = '0; e0 = '0;
      for (int n = 0; n < N; n++)
        for (int m = 0; m < N; m++)
          if (comp[m] == comp[n]) begin
            e1[n] = e1[n] | drv1[m];
            e0[n] = e0[n] | drv0[m];
          end
      #1;
      checks++;
      if (val !== e1 || driven !== (e1 | e0) || conflict !== (e1 & e0) || converged !== 1'b1) begin
        failures++;
        $display("FAIL trial %0d: val=%b exp=%b driven=%b exp=%b conv=%0b", trial, val, e1,
                 driven, e1 | e0, converged);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
