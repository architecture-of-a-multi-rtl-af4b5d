// tb_size_controller: checks that memory bit 1 routes the context-ID bit
// and memory bit 0 routes the computation input to the plane-select line.
module tb_size_controller;
  logic mem, ctx, data, sel;
  int   checks = 0, failures = 0;

  size_controller dut (.mem(mem), .ctx(ctx), .data(data), .sel(sel));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic exp;
      {mem, ctx, data} = 3'(i);
      #1;
      exp = mem ? ctx : data;
      checks++;
      if (sel !== exp) begin
        failures++;
        $display("FAIL mem=%0b ctx=%0b data=%0b sel=%0b", mem, ctx, data, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
