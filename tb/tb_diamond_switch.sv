// tb_diamond_switch: checks each of the six SEs of the diamond switch in
// its three uses (off, on, following U), and that the resolved diamond
// joins the intended pairs of line ends: driving end N with each SE alone
// closed must reach exactly the end that SE leads to.
module tb_diamond_switch;
  import rcm_pkg::*;

  se_cfg_t [DIA_SES-1:0] cfg;
  logic    [DIA_SES-1:0] u, on;
  int checks = 0, failures = 0;

  diamond_switch dut (.cfg(cfg), .u(u), .on(on));

  // Reference pass-gate resolution of the four ends, written out by hand
  // from the diamond's drawing: U1 N-W, U2 N-E, U3 E-S, U4 S-W, U5 W-E, U6 N-S.
  function automatic logic [3:0] reach_from(input dia_term_e src, input logic [5:0] g);
    logic [3:0] r;
    r = '0;
    r[src] = 1'b1;
    for (int it = 0; it < 4; it++) begin
      if (g[0] && (r[DIA_N] || r[DIA_W])) begin r[DIA_N] = 1; r[DIA_W] = 1; end
      if (g[1] && (r[DIA_N] || r[DIA_E])) begin r[DIA_N] = 1; r[DIA_E] = 1; end
      if (g[2] && (r[DIA_E] || r[DIA_S])) begin r[DIA_E] = 1; r[DIA_S] = 1; end
      if (g[3] && (r[DIA_S] || r[DIA_W])) begin r[DIA_S] = 1; r[DIA_W] = 1; end
      if (g[4] && (r[DIA_W] || r[DIA_E])) begin r[DIA_W] = 1; r[DIA_E] = 1; end
      if (g[5] && (r[DIA_N] || r[DIA_S])) begin r[DIA_N] = 1; r[DIA_S] = 1; end
    end
    return r;
  endfunction

  localparam logic [DIA_SES-1:0][15:0] EA = {16'(DIA_N), 16'(DIA_W), 16'(DIA_S),
                                              16'(DIA_E), 16'(DIA_N), 16'(DIA_N)};
  localparam logic [DIA_SES-1:0][15:0] EB = {16'(DIA_S), 16'(DIA_E), 16'(DIA_W),
                                              16'(DIA_S), 16'(DIA_E), 16'(DIA_W)};
  logic [3:0] d1, d0, val, drv, cfl;
  logic       conv;
  pass_net #(.N(4), .E(DIA_SES), .EA(EA), .EB(EB)) u_net (
    .en(on), .drv1(d1), .drv0(d0), .val(val), .driven(drv), .conflict(cfl), .converged(conv)
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d1 = '0; d0 = '0;
    // per-SE function
    for (int k = 0; k < DIA_SES; k++)
      for (int m = 0; m < 4; m++) begin
        logic exp;
        cfg = '0; u = '0;
        u[k] = m[0];
        case (m / 2)
          0: begin cfg[k] = '{d1: 1'b0, d0: m[0]}; exp = m[0]; end
          default: begin cfg[k] = '{d1: 1'b1, d0: 1'b0}; exp = m[0]; end
        endcase
        #1;
        checks++;
        if (on[k] !== exp || (on & ~(6'(1) << k)) !== '0) begin
          failures++;
          $display("FAIL SE U%0d mode %0d: on=%b", k + 1, m, on);
        end
      end
    // connectivity: each SE alone, then random mixes, driven from every end
    for (int trial = 0; trial < 6 + 40; trial++) begin
      logic [5:0] g;
      g = (trial < 6) ? 6'(1 << trial) : 6'($urandom);
      for (int k = 0; k < DIA_SES; k++) cfg[k] = '{d1: 1'b1, d0: 1'b0};
      u = g;
      for (int s = 0; s < 4; s++) begin
        d1 = 4'(1 << s);
        #1;
        checks++;
        if (val !== reach_from(dia_term_e'(s), g)) begin
          failures++;
          $display("FAIL reach from %0d with gates %b: got %b exp %b", s, g, val,
                   reach_from(dia_term_e'(s), g));
        end
      end
      d1 = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
