// tb_mc_fpga_fepg: the end-to-end scenario of tb_mc_fpga run on the fabric
// built from ferroelectric functional pass-gates (FEPG = 1). The same
// routing and logic are loaded, with every switch-element setting
// re-encoded for the FePG (U: d1 d0 = 00, constant 1: 10, constant 0: 01),
// and the same results are expected.
module tb_mc_fpga_fepg;
  import rcm_pkg::*;

  localparam int unsigned TR = 2, TC = 3, ROWS = 2, COLS = 3;
  localparam int unsigned NP = 42;
  // pin numbers (see the pin order of mc_fpga)
  localparam int unsigned P_WEST1   = 1;            // tile (1,0) h(2,0)
  localparam int unsigned P_EAST0_2 = 4;            // tile (0,2) h(2,3)
  localparam int unsigned P_N00     = 8;            // tile (0,0) v(0,0..3): 8..11
  localparam int unsigned P_A       = 17;           // tile (0,2) v(0,1)
  localparam int unsigned P_B       = 18;           // tile (0,2) v(0,2)
  localparam int unsigned P_S10_1   = 21;           // tile (1,0) v(2,1)
  localparam int unsigned P_S10_3   = 23;           // tile (1,0) v(2,3)
  localparam int unsigned P_S12_1   = 29;           // tile (1,2) v(2,1)
  localparam int unsigned P_N01     = 12;           // tile (0,1) v(0,0..2): 12..14

  ctx_id_t                                      ctx;
  logic    [TR-1:0][TC-1:0][ROWS:0][COLS:0]     p_mem;
  se_cfg_t [TR-1:0][TC-1:0][ROWS:0][COLS-1:0]   hse_cfg;
  se_cfg_t [TR-1:0][TC-1:0][ROWS-1:0][COLS:0]   vse_cfg;
  logic    [TR-1:0][TC-1:0][ROWS-1:0][COLS-1:0] c_inv;
  se_cfg_t [TR-1:0][TC-1:0][DIA_SES-1:0]        dia_cfg;
  logic    [TR-1:0][TC-1:0][63:0]               lut_bits;
  logic    [TR-1:0][TC-1:0][1:0]                lut_sc;
  logic    [NP-1:0]                             pin_in, pin_oe, pin_out, pin_driven;
  logic    [TR-1:0][TC-1:0]                     lb_out;
  logic                                         settled, conflict;

  mc_fpga #(.FEPG(1'b1)) dut (
    .ctx(ctx), .p_mem(p_mem), .hse_cfg(hse_cfg), .vse_cfg(vse_cfg), .c_inv(c_inv),
    .dia_cfg(dia_cfg), .lut_bits(lut_bits), .lut_sc(lut_sc),
    .pin_in(pin_in), .pin_oe(pin_oe), .pin_out(pin_out), .pin_driven(pin_driven),
    .lb_out(lb_out), .settled(settled), .conflict(conflict)
  );

  int checks = 0, failures = 0;
  int n_ctx [4];
  int n_lut4, n_lut6, n_lut5, n_sel_a, n_sel_b, n_double, n_link, n_conflict, n_rcm_sc;

  localparam se_cfg_t SE_ON  = '{d1: 1'b0, d0: 1'b1};
  localparam se_cfg_t SE_U   = '{d1: 1'b1, d0: 1'b0};

  // functions mapped into the logic blocks
  function automatic logic f4(input int p, input logic [3:0] d);
    case (p)
      0: return &d;
      1: return |d;
      2: return ^d;
      default: return (d[0] & d[1]) | (d[2] & d[3]);
    endcase
  endfunction
  function automatic logic f6(input logic [5:0] x);
    return (^x[3:0]) ^ (x[4] & x[5]) ^ (x[1] & x[4]);
  endfunction

  function automatic se_cfg_t to_fepg(input se_cfg_t c);
    if (c.d1)      return '{d1: 1'b0, d0: 1'b0};
    else if (c.d0) return '{d1: 1'b1, d0: 1'b0};
    else           return '{d1: 1'b0, d0: 1'b1};
  endfunction

  task automatic load_config(input logic [1:0] sc10);
    p_mem = '0; hse_cfg = '0; vse_cfg = '0; c_inv = '0; dia_cfg = '0;
    lut_bits = '0; lut_sc = '0;
    // tile (0,0): 4-input LUT, four planes
    for (int i = 0; i < 64; i++) lut_bits[0][0][i] = f4(i % 4, 4'(i / 4));
    lut_sc[0][0] = 2'b11;
    for (int c = 0; c < 3; c++) begin
      vse_cfg[0][0][0][c] = SE_ON;  // pins -> v(1,c) -> v(2,c) -> tile (1,0)
      vse_cfg[0][0][1][c] = SE_ON;
    end
    vse_cfg[0][0][1][3] = SE_ON;    // LB output v(1,3) -> v(2,3)
    dia_cfg[0][0][1]    = SE_ON;    // U2: N-E, onto the double-length line
    // tile (1,0): 6-input memory, shape chosen by sc10
    for (int i = 0; i < 64; i++)
      lut_bits[1][0][i] = f6({1'(i >> 1), 1'(i), 4'(i >> 2)});
    lut_sc[1][0] = sc10;
    p_mem[1][0][2][0]   = 1'b1;     // west pin h(2,0) -> v(2,0)
    vse_cfg[1][0][1][0] = SE_ON;    // -> v(1,0) = x4
    vse_cfg[1][0][1][1] = SE_ON;    // south pin v(2,1) -> v(1,1) = x5
    vse_cfg[1][0][1][3] = SE_ON;    // LB output -> south pin v(2,3)
    // tile (1,1): 6-input LUT, x4 joined to the S0 track by P(1,0)
    for (int i = 0; i < 64; i++)
      lut_bits[1][1][i] = f6({1'(i >> 1), 1'(i), 4'(i >> 2)});
    lut_sc[1][1] = 2'b00;
    p_mem[1][1][1][0] = 1'b1;
    for (int c = 0; c < 3; c++) begin
      vse_cfg[0][1][0][c] = SE_ON;  // north pins of tile (0,1) -> tile (1,1) x0..x2
      vse_cfg[0][1][1][c] = SE_ON;
    end
    // tile (0,2): decoded multiplexer G = S1 ? A : B
    c_inv[0][2][0][0]   = 1'b0;
    c_inv[0][2][0][1]   = 1'b1;
    hse_cfg[0][2][0][0] = SE_ON;
    vse_cfg[0][2][0][1] = SE_U;
    vse_cfg[0][2][0][2] = SE_U;
    vse_cfg[0][2][1][1] = SE_ON;
    vse_cfg[0][2][1][2] = SE_ON;
    p_mem[0][2][2][1]   = 1'b1;
    p_mem[0][2][2][2]   = 1'b1;
    hse_cfg[0][2][2][1] = SE_ON;
    // tile (1,2): carry G down to the south pin
    vse_cfg[1][2][0][1] = SE_ON;
    vse_cfg[1][2][1][1] = SE_ON;
    // re-encode every SE for the ferroelectric pass-gate
    for (int i = 0; i < TR; i++)
      for (int j = 0; j < TC; j++) begin
        for (int r = 0; r <= ROWS; r++)
          for (int c = 0; c < COLS; c++) hse_cfg[i][j][r][c] = to_fepg(hse_cfg[i][j][r][c]);
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c <= COLS; c++) vse_cfg[i][j][r][c] = to_fepg(vse_cfg[i][j][r][c]);
        for (int k = 0; k < DIA_SES; k++) dia_cfg[i][j][k] = to_fepg(dia_cfg[i][j][k]);
      end
  endtask

  task automatic expect_eq(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b exp %0b (ctx=%0d pins=%h)", what, got, exp, ctx, pin_in);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_lut4 = 0; n_lut6 = 0; n_lut5 = 0; n_sel_a = 0; n_sel_b = 0;
    n_double = 0; n_link = 0; n_conflict = 0; n_rcm_sc = 0;
    for (int c = 0; c < 4; c++) n_ctx[c] = 0;

    for (int phase = 0; phase < 2; phase++) begin
      for (int trial = 0; trial < 160; trial++) begin
        logic [3:0] xn;
        logic       w1, s1p, a, b, z00, z10;
        logic [5:0] x10;
        load_config(phase == 0 ? 2'b00 : 2'b01);
        ctx = ctx_id_t'(trial % 4);
        xn  = 4'($urandom);
        w1  = 1'($urandom);
        s1p = 1'($urandom);
        a   = 1'($urandom);
        b   = 1'($urandom);
        pin_in = '0; pin_oe = '0;
        for (int k = 0; k < 4; k++) begin
          pin_in[P_N00 + k] = xn[k]; pin_oe[P_N00 + k] = 1'b1;
        end
        for (int k = 0; k < 3; k++) begin
          pin_in[P_N01 + k] = xn[k] ^ w1; pin_oe[P_N01 + k] = 1'b1;
        end
        pin_in[P_WEST1] = w1;   pin_oe[P_WEST1] = 1'b1;
        pin_in[P_S10_1] = s1p;  pin_oe[P_S10_1] = 1'b1;
        pin_in[P_A]     = a;    pin_oe[P_A]     = 1'b1;
        pin_in[P_B]     = b;    pin_oe[P_B]     = 1'b1;
        #1;
        // expected values from the intended functions
        z00 = f4(int'(ctx), xn);
        x10 = {s1p, w1, z00, xn[2:0]};
        if (phase == 1) x10[4] = ctx[0];   // 5-input: S0 picks the plane
        z10 = f6(x10);

        n_ctx[ctx]++;
        expect_eq(settled, 1'b1, "settled");
        expect_eq(conflict, 1'b0, "no conflict");
        expect_eq(lb_out[0][0], z00, "LB(0,0) four-plane function");
        expect_eq(pin_out[P_EAST0_2], z00, "diamond + double-length line");
        expect_eq(pin_driven[P_EAST0_2], 1'b1, "east pin driven");
        expect_eq(pin_out[P_S10_3], z10, "LB(1,0) through inter-tile links");
        expect_eq(pin_out[P_S12_1], ctx[1] ? a : b, "decoded multiplexer");
        expect_eq(lb_out[1][1], f6({1'b0, ctx[0], 1'b0, xn[2:0] ^ {3{w1}}}), "RCM as size controller");
        if (lb_out[1][1] === f6({1'b0, ctx[0], 1'b0, xn[2:0] ^ {3{w1}}})) n_rcm_sc++;
        n_lut4++;
        if (phase == 0) n_lut6++; else n_lut5++;
        if (pin_out[P_EAST0_2] === z00) n_double++;
        if (pin_out[P_S10_3] === z10) n_link++;
        if (ctx[1]) n_sel_a++; else n_sel_b++;
      end
    end

    // conflict: drive the east pin against the routed LB output
    load_config(2'b00);
    ctx = 2'd0;
    pin_in = '0; pin_oe = '0;
    for (int k = 0; k < 4; k++) pin_oe[P_N00 + k] = 1'b1;   // x = 0000 -> AND = 0
    pin_in[P_EAST0_2] = 1'b1; pin_oe[P_EAST0_2] = 1'b1;
    #1;
    expect_eq(conflict, 1'b1, "conflict flagged");
    if (conflict) n_conflict++;
    pin_in[P_EAST0_2] = 1'b0;
    #1;
    expect_eq(conflict, 1'b0, "agreeing drivers are no conflict");

    // every mechanism must have occurred
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (n_ctx[c] == 0) begin failures++; $display("FAIL context %0d never used", c); end
    end
    checks++; if (n_lut4 == 0)     begin failures++; $display("FAIL no 4-input use"); end
    checks++; if (n_lut6 == 0)     begin failures++; $display("FAIL no 6-input use"); end
    checks++; if (n_lut5 == 0)     begin failures++; $display("FAIL no 5-input use"); end
    checks++; if (n_sel_a == 0)    begin failures++; $display("FAIL decoded route A never"); end
    checks++; if (n_sel_b == 0)    begin failures++; $display("FAIL decoded route B never"); end
    checks++; if (n_double == 0)   begin failures++; $display("FAIL double-length path never"); end
    checks++; if (n_link == 0)     begin failures++; $display("FAIL inter-tile link never"); end
    checks++; if (n_conflict == 0) begin failures++; $display("FAIL conflict never"); end
    checks++; if (n_rcm_sc == 0)   begin failures++; $display("FAIL RCM size controller never"); end
    $display("mechanisms: ctx=%0d/%0d/%0d/%0d lut4=%0d lut6=%0d lut5=%0d selA=%0d selB=%0d double=%0d link=%0d conflict=%0d rcm_sc=%0d",
             n_ctx[0], n_ctx[1], n_ctx[2], n_ctx[3], n_lut4, n_lut6, n_lut5, n_sel_a, n_sel_b,
             n_double, n_link, n_conflict, n_rcm_sc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
