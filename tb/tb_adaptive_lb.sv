// tb_adaptive_lb: checks the three shapes of the locally controlled
// multi-context LUT and a two-block mapping that shares logic between
// contexts.
//  * 4-input / four planes: each context selects its own function.
//  * 5-input / two planes: S0 selects the plane, x[5] is the fifth input.
//  * 6-input / one plane: the context ID is ignored.
//  * Two-context mapping: block 1 (two planes picked by S0) computes
//    X = R&T in the S0 = 0 context and X = R^T in the S0 = 1 context;
//    block 2 (single plane, three inputs) computes the shared part
//    Z = (X|V) & W for both contexts. Z is compared with the two data-flow
//    graphs evaluated directly.
// Memory contents are generated from the intended functions; expected
// outputs are computed from the same functions, not from the memory bits.
module tb_adaptive_lb;
  import rcm_pkg::*;

  logic [63:0] bits_a, bits_b;
  logic [1:0]  sc_a, sc_b;
  ctx_id_t     ctx;
  logic [5:0]  xa, xb;
  logic        za, zb;
  int          checks = 0, failures = 0;

  adaptive_lb dut_a (.lut_bits(bits_a), .sc(sc_a), .ctx(ctx), .x(xa), .z(za));
  adaptive_lb dut_b (.lut_bits(bits_b), .sc(sc_b), .ctx(ctx), .x(xb), .z(zb));

  function automatic logic f4(input int p, input logic [3:0] d);
    case (p)
      0: return &d;
      1: return |d;
      2: return ^d;
      default: return ~(d[0] & d[3]);
    endcase
  endfunction

  function automatic logic f6(input logic [5:0] x);
    return (^x[3:0]) ^ (x[4] & x[5]) ^ (x[0] & x[5]);
  endfunction

  task automatic expect_eq(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b exp %0b (ctx=%0d xa=%b xb=%b sc=%b) t=%0t", what, got, exp, ctx, xa, xb, sc_a, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [5:0] xv, xe;
  logic       r, t, v, w, xdfg, zdfg;

  initial begin
    // ---- 4-input, four planes ----
    for (int i = 0; i < 64; i++) begin
      bits_a[i] = f4(i % 4, 4'(i / 4));
    end
    sc_a = 2'b11;
    bits_b = '0; sc_b = '0; xb = '0;
    for (int c = 0; c < 4; c++)
      for (int d = 0; d < 64; d++) begin
        ctx = ctx_id_t'(c); xa = 6'(d); sc_a = 2'b11;
        #1;
        expect_eq(za, f4(c, xa[3:0]), "4-input");
      end

    // ---- 6-input, one plane ----
    for (int i = 0; i < 64; i++) begin
      // memory index {x3..x0, sel1, sel0}; sel1 = x5, sel0 = x4
      xv = {1'(i >> 1), 1'(i), 4'(i >> 2)};
      bits_a[i] = f6(xv);
    end
    sc_a = 2'b00;
    for (int c = 0; c < 4; c++)
      for (int d = 0; d < 64; d++) begin
        ctx = ctx_id_t'(c); xa = 6'(d); sc_a = 2'b00;
        #1;
        expect_eq(za, f6(xa), "6-input");
      end

    // ---- 5-input, two planes picked by S0 (same memory) ----
    sc_a = 2'b01;
    for (int c = 0; c < 4; c++)
      for (int d = 0; d < 64; d++) begin
        ctx = ctx_id_t'(c); xa = 6'(d); sc_a = 2'b01;
        xe = xa; xe[4] = ctx[0];
        #1;
        expect_eq(za, f6(xe), "5-input");
      end

    // ---- two-context mapping with a shared node ----
    // block a: inputs R = x0, T = x1; plane S0=0: R&T, plane S0=1: R^T
    bits_a = '0;
    for (int d = 0; d < 4; d++) begin
      bits_a[d*4 + 0] = d[0] & d[1];
      bits_a[d*4 + 1] = d[0] ^ d[1];
    end
    sc_a = 2'b01;  // sel0 = S0, sel1 = x5 (held 0)
    // block b: inputs X = x0, V = x1, W = x2; single plane: (X|V)&W
    bits_b = '0;
    for (int d = 0; d < 8; d++)
      bits_b[d*4] = (d[0] | d[1]) & d[2];
    sc_b = 2'b00;  // x4 = x5 = 0 select the plane
    for (int c = 0; c < 4; c++)
      for (int d = 0; d < 16; d++) begin
        ctx = ctx_id_t'(c);
        {r, t, v, w} = 4'(d);
        xa = {4'b0000, t, r}; sc_a = 2'b01; sc_b = 2'b00;
        #1;
        xb = {3'b000, w, v, za};
        #1;
        xdfg = ctx[0] ? (r ^ t) : (r & t);
        zdfg = (xdfg | v) & w;
        expect_eq(zb, zdfg, "shared mapping");
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
