// tb_fepg_se: exhaustive check of the ferroelectric functional pass-gate
// against its truth table: d1 d0 = 00 or 11 pass U, 01 gives 0, 10 gives 1.
module tb_fepg_se;
  logic d1, d0, u, g;
  int   checks = 0, failures = 0;

  fepg_se dut (.d1(d1), .d0(d0), .u(u), .g(g));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic exp;
      {d1, d0, u} = 3'(i);
      #1;
      case ({d1, d0})
        2'b00, 2'b11: exp = u;
        2'b01:        exp = 1'b0;
        default:      exp = 1'b1;
      endcase
      checks++;
      if (g !== exp) begin
        failures++;
        $display("FAIL d1=%0b d0=%0b u=%0b g=%0b exp=%0b", d1, d0, u, g, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
