// tb_switch_element: exhaustive check of the switch element against its
// truth table (D1 = 1 passes U, D1 = 0 passes D0), then a check that one SE
// generates each context-independent and single-ID-bit configuration
// pattern over the four contexts when U is tied to S1, S0 or a constant.
module tb_switch_element;
  import rcm_pkg::*;

  se_cfg_t cfg;
  logic    u, g;
  int      checks = 0, failures = 0;

  switch_element dut (.cfg(cfg), .u(u), .g(g));

  task automatic check(input logic exp, input string what);
    checks++;
    if (g !== exp) begin
      failures++;
      $display("FAIL %s: d1=%0b d0=%0b u=%0b g=%0b exp=%0b", what, cfg.d1, cfg.d0, u, g, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // truth table
    for (int i = 0; i < 8; i++) begin
      cfg.d1 = i[2];
      cfg.d0 = i[1];
      u      = i[0];
      #1;
      if (i[2]) check(i[0], "variable");
      else      check(i[1], "constant");
    end
    // patterns over contexts: G as 4-bit word {C3,C2,C1,C0}
    begin
      logic [3:0] pat;
      logic [3:0] want [4];
      want[0] = 4'b1100;  // U = S1
      want[1] = 4'b1010;  // U = S0
      want[2] = 4'b0000;  // constant 0
      want[3] = 4'b1111;  // constant 1
      for (int m = 0; m < 4; m++) begin
        for (int c = 0; c < 4; c++) begin
          ctx_id_t id;
          id = ctx_id_t'(c);
          case (m)
            0: begin cfg = '{d1: 1'b1, d0: 1'b0}; u = id[1]; end
            1: begin cfg = '{d1: 1'b1, d0: 1'b1}; u = id[0]; end
            2: begin cfg = '{d1: 1'b0, d0: 1'b0}; u = id[0]; end
            default: begin cfg = '{d1: 1'b0, d0: 1'b1}; u = id[1]; end
          endcase
          #1;
          pat[c] = g;
        end
        checks++;
        if (pat !== want[m]) begin
          failures++;
          $display("FAIL pattern %0d: got %b want %b", m, pat, want[m]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
