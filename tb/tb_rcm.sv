// tb_rcm: checks the reconfigurable context memory block in two ways.
//  1. Random memory bits and track values: every pass-gate state is
//     compared with a reference model of the mesh (P follows its memory
//     bit; an SE gives D0, or with D1 = 1 the output of the controller of
//     the cell above it / left of it, i.e. that cell's track value XOR INV).
//  2. Context decoding in the pass-gate network: a 2 x 3 cell block is
//     configured as a pass-gate multiplexer G = S1 ? A : B, where the S1
//     gate is decoded by one SE from the S1 track and the not-S1 gate by a
//     second SE through an inverting input controller. Driving A and B with
//     0, 1, S0 or not-S0 produces every one of the 16 configuration
//     patterns over the four contexts; each is checked in every context.
//     The block is evaluated over three rounds (decode, route, check).
module tb_rcm;
  import rcm_pkg::*;

  localparam int unsigned ROWS = 2;
  localparam int unsigned COLS = 3;
  localparam int unsigned NH   = (ROWS+1)*(COLS+1);
  localparam int unsigned N    = 2*NH;
  localparam int unsigned E    = NH + (ROWS+1)*COLS + ROWS*(COLS+1);
  localparam int unsigned RND  = 3;

  function automatic int unsigned nh(int unsigned r, int unsigned c); return r*(COLS+1) + c; endfunction
  function automatic int unsigned nv(int unsigned r, int unsigned c); return NH + r*(COLS+1) + c; endfunction

  function automatic logic [E-1:0][15:0] mk(bit side);
    logic [E-1:0][15:0] x;
    int unsigned e;
    e = 0;
    for (int unsigned r = 0; r <= ROWS; r++)
      for (int unsigned c = 0; c <= COLS; c++) begin x[e] = 16'(side ? nv(r,c) : nh(r,c)); e++; end
    for (int unsigned r = 0; r <= ROWS; r++)
      for (int unsigned c = 0; c < COLS; c++) begin x[e] = 16'(side ? nh(r,c+1) : nh(r,c)); e++; end
    for (int unsigned r = 0; r < ROWS; r++)
      for (int unsigned c = 0; c <= COLS; c++) begin x[e] = 16'(side ? nv(r+1,c) : nv(r,c)); e++; end
    return x;
  endfunction
  localparam logic [E-1:0][15:0] EA = mk(1'b0);
  localparam logic [E-1:0][15:0] EB = mk(1'b1);

  logic    [ROWS:0][COLS:0]     p_mem;
  se_cfg_t [ROWS:0][COLS-1:0]   hse_cfg;
  se_cfg_t [ROWS-1:0][COLS:0]   vse_cfg;
  logic    [ROWS-1:0][COLS-1:0] c_inv;
  logic    [N-1:0]              d1, d0;
  logic    [RND:0][N-1:0]       val;
  int checks = 0, failures = 0;

  // ---- part 1: the block on its own ----
  logic [ROWS-1:0][COLS-1:0] hv;
  logic [ROWS:0][COLS:0]     p_on;
  logic [ROWS:0][COLS-1:0]   hse_on;
  logic [ROWS-1:0][COLS:0]   vse_on;

  rcm #(.ROWS(ROWS), .COLS(COLS)) dut (
    .p_mem(p_mem), .hse_cfg(hse_cfg), .vse_cfg(vse_cfg), .c_inv(c_inv),
    .h_val(hv), .p_on(p_on), .hse_on(hse_on), .vse_on(vse_on)
  );

  // ---- part 2: rounds of the block and its pass-gate network ----
  assign val[0] = '0;
  for (genvar l = 1; l <= RND; l++) begin : g_rnd
    logic [ROWS-1:0][COLS-1:0] h;
    logic [ROWS:0][COLS:0]     po;
    logic [ROWS:0][COLS-1:0]   ho;
    logic [ROWS-1:0][COLS:0]   vo;
    logic [N-1:0]              drv, cfl;
    logic                      conv;
    for (genvar r = 0; r < ROWS; r++) begin : g_r
      for (genvar c = 0; c < COLS; c++) begin : g_c
        assign h[r][c] = val[l-1][r*(COLS+1) + c];
      end
    end
    rcm #(.ROWS(ROWS), .COLS(COLS)) u_blk (
      .p_mem(p_mem), .hse_cfg(hse_cfg), .vse_cfg(vse_cfg), .c_inv(c_inv),
      .h_val(h), .p_on(po), .hse_on(ho), .vse_on(vo)
    );
    pass_net #(.N(N), .E(E), .EA(EA), .EB(EB)) u_net (
      .en({vo, ho, po}), .drv1(d1), .drv0(d0),
      .val(val[l]), .driven(drv), .conflict(cfl), .converged(conv)
    );
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d1 = '0; d0 = '0;
    // ---- part 1 ----
    for (int trial = 0; trial < 200; trial++) begin
      bit ok;
      p_mem = ($bits(p_mem))'($urandom);
      hse_cfg = ($bits(hse_cfg))'({$urandom, $urandom});
      vse_cfg = ($bits(vse_cfg))'({$urandom, $urandom});
      c_inv = ($bits(c_inv))'($urandom);
      hv = ($bits(hv))'($urandom);
      #1;
      ok = (p_on === p_mem);
      for (int r = 0; r <= ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          logic u;
          u = (r == 0) ? 1'b0 : (hv[r-1][c] ^ c_inv[r-1][c]);
          if (hse_on[r][c] !== (hse_cfg[r][c].d1 ? u : hse_cfg[r][c].d0)) ok = 0;
        end
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c <= COLS; c++) begin
          logic u;
          u = (c == 0) ? 1'b0 : (hv[r][c-1] ^ c_inv[r][c-1]);
          if (vse_on[r][c] !== (vse_cfg[r][c].d1 ? u : vse_cfg[r][c].d0)) ok = 0;
        end
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL pass-gate states, trial %0d", trial);
      end
    end

    // ---- part 2: multiplexer G = S1 ? A : B ----
    for (int p = 0; p < 16; p++) begin
      for (int c = 0; c < 4; c++) begin
        logic [3:0] pat;
        logic s1, s0, a, b;
        pat = 4'(p);
        {s1, s0} = 2'(c);
        p_mem = '0; hse_cfg = '0; vse_cfg = '0; c_inv = '0;
        c_inv[0][0]   = 1'b0;                    // u = S1 for vse(0,1)
        c_inv[0][1]   = 1'b1;                    // u = not S1 for vse(0,2)
        hse_cfg[0][0] = '{d1: 1'b0, d0: 1'b1};   // carry S1 to h(0,1)
        vse_cfg[0][1] = '{d1: 1'b1, d0: 1'b0};   // gate S1: A -> v(1,1)
        vse_cfg[0][2] = '{d1: 1'b1, d0: 1'b0};   // gate not S1: B -> v(1,2)
        vse_cfg[1][1] = '{d1: 1'b0, d0: 1'b1};
        vse_cfg[1][2] = '{d1: 1'b0, d0: 1'b1};
        p_mem[2][1]   = 1'b1;
        p_mem[2][2]   = 1'b1;
        hse_cfg[2][1] = '{d1: 1'b0, d0: 1'b1};   // join the two branches
        // sources: S1, S0 on the context tracks; A and B on north ends
        a = pat[{1'b1, s0}];
        b = pat[{1'b0, s0}];
        d1 = '0; d0 = '0;
        d1[nh(0,0)] = s1;  d0[nh(0,0)] = !s1;
        d1[nh(1,0)] = s0;  d0[nh(1,0)] = !s0;
        d1[nv(0,1)] = a;   d0[nv(0,1)] = !a;
        d1[nv(0,2)] = b;   d0[nv(0,2)] = !b;
        #1;
        checks++;
        if (val[RND][nv(2,1)] !== pat[c] || g_rnd[RND].drv[nv(2,1)] !== 1'b1
            || g_rnd[RND].cfl != '0 || val[RND] != val[RND-1]) begin
          failures++;
          $display("FAIL pattern %b context %0d: G=%0b", pat, c, val[RND][nv(2,1)]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
