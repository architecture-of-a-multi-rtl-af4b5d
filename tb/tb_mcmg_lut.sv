// tb_mcmg_lut: fills the 64 memory bits so that each configuration plane
// holds a different known function of the four computation inputs (plane
// k = bit k of every group), then checks every plane-select value and
// every input combination against those functions. A second pass with
// random memory contents checks the bit addressing {data, sel}.
module tb_mcmg_lut;
  logic [63:0] bits;
  logic [3:0]  data;
  logic [1:0]  sel;
  logic        z;
  int          checks = 0, failures = 0;

  mcmg_lut dut (.bits(bits), .data(data), .sel(sel), .z(z));

  function automatic logic plane_fn(input int p, input logic [3:0] d);
    case (p)
      0: return &d;
      1: return |d;
      2: return ^d;
      default: return (d[0] & d[1]) | (d[2] & d[3]);
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++)
      for (int p = 0; p < 4; p++)
        bits[d*4 + p] = plane_fn(p, 4'(d));
    for (int p = 0; p < 4; p++)
      for (int d = 0; d < 16; d++) begin
        sel = 2'(p); data = 4'(d);
        #1;
        checks++;
        if (z !== plane_fn(p, data)) begin
          failures++;
          $display("FAIL plane %0d data %h: z=%0b", p, d, z);
        end
      end
    for (int n = 0; n < 200; n++) begin
      logic [5:0] idx;
      bits = {$urandom, $urandom};
      idx  = 6'($urandom);
      {data, sel} = idx;
      #1;
      checks++;
      if (z !== bits[idx]) begin
        failures++;
        $display("FAIL random idx %0d", idx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
