// tb_input_controller: checks that the input controller passes its track
// value unchanged with INV = 0 and inverted with INV = 1.
module tb_input_controller;
  logic inv, a, u;
  int   checks = 0, failures = 0;

  input_controller dut (.inv(inv), .a(a), .u(u));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      logic exp;
      {inv, a} = 2'(i);
      #1;
      exp = (inv == 1'b1) ? !a : a;
      checks++;
      if (u !== exp) begin
        failures++;
        $display("FAIL inv=%0b a=%0b u=%0b", inv, a, u);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
