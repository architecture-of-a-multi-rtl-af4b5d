// mc_fpga: multi-context FPGA fabric built from reconfigurable context
// memory (RCM) switch blocks and adaptive multi-context logic blocks.
//
// The fabric is a TR x TC array of tiles. Each tile has
//   * an RCM switch block (rcm) of ROWS x COLS cells: a mesh of tracks whose
//     pass-gates are switch elements, programmable switches and input
//     controllers; it routes data and also decodes the global context ID
//     locally into context-dependent switch settings;
//   * an adaptive logic block (adaptive_lb): a 64-bit MCMG-LUT whose size
//     (4, 5 or 6 inputs) and number of configuration planes (4, 2 or 1) is
//     set per block;
//   * a diamond switch (diamond_switch) joining double-length lines, its
//     six SEs controlled from the tile's RCM.
// The two context-ID bits are global wires, driven into every RCM on the
// horizontal tracks h(0,0) (S1) and h(1,0) (S0), where the RCM's switch
// elements decode them. Switching context only changes these two wires;
// no memory bit is rewritten.
//
// FEPG selects the switch-element circuit of every RCM and diamond switch:
// the CMOS multiplexer SE (default) or the ferroelectric functional
// pass-gate, whose two memory bits encode the same three uses differently
// (see fepg_se).
//
// Wiring of a tile (this design's choice where the drawings leave it open):
//   LB inputs x[k] read the k-th vertical-track node v(r,c) in row-major
//   order from v(0,0); the LB output drives v(1,COLS). Diamond end N is
//   wired to v(ROWS,COLS), end W to h(ROWS,COLS); U1..U6 read horizontal
//   nodes h(ROWS,COLS-1), h(ROWS,COLS-2), ... (row-major, backwards).
//   Neighbouring RCMs share track ends: h(r,COLS) of a tile is wired to
//   h(r,0) of its east neighbour for r >= 2 (rows 0 and 1 carry the context
//   ID), v(ROWS,c) to v(0,c) of its south neighbour. A double-length line
//   joins diamond end E of tile (i,j) to end W of tile (i,j+2), and end S
//   of tile (i,j) to end N of tile (i+2,j), skipping the diamond between.
//   Track ends at the array edge and unpaired diamond ends are pins.
//
// Pins (index order): west h(r,0), r = 2..ROWS, of column-0 tiles; east
// h(r,COLS), r = 0..ROWS, of the last column; north v(0,c) of row 0;
// south v(ROWS,c) of the last row; unpaired diamond E ends, then S ends,
// tiles in row-major order. A pin is driven with pin_in while pin_oe is 1;
// pin_out reads the resolved node and pin_driven tells whether anything
// drives it.
//
// Timing: the fabric is combinational, like the pass-gate network it
// models. Because switch settings can depend on track values (decoded
// context bits) and logic-block outputs feed tracks, it is evaluated in
// LEVELS rounds: round l computes every pass-gate state and LB output from
// the node values of round l-1 (round 0 starts from all-zero tracks) and
// resolves the network again. `settled` is 1 when the last two rounds
// agree and the last resolution converged within SWEEPS sweeps, i.e.
// LEVELS and SWEEPS covered the configuration's longest chain of decode
// and logic stages and its longest routes; `conflict` flags a node driven
// both ways. Neither is a hardware signal: they tell whether the model has
// reached the state the real network settles to.
module mc_fpga
  import rcm_pkg::*;
#(
  parameter int unsigned TR     = 2,  // tile rows
  parameter int unsigned TC     = 3,  // tile columns
  parameter int unsigned ROWS   = 2,  // RCM cell rows per tile
  parameter int unsigned COLS   = 3,  // RCM cell columns per tile
  parameter int unsigned LEVELS = 4,  // evaluation rounds
  parameter int unsigned SWEEPS = 8,  // pass-gate resolution sweeps per round
  parameter bit          FEPG   = 1'b0, // 1: all SEs are ferroelectric functional pass-gates
  // derived
  parameter int unsigned NP = TR*(ROWS-1) + TR*(ROWS+1) + 2*TC*(COLS+1)
                            + TR*((TC < 2) ? TC : 2) + TC*((TR < 2) ? TR : 2)
) (
  input  ctx_id_t                                         ctx,      // context ID {S1,S0}
  input  logic    [TR-1:0][TC-1:0][ROWS:0][COLS:0]        p_mem,
  input  se_cfg_t [TR-1:0][TC-1:0][ROWS:0][COLS-1:0]      hse_cfg,
  input  se_cfg_t [TR-1:0][TC-1:0][ROWS-1:0][COLS:0]      vse_cfg,
  input  logic    [TR-1:0][TC-1:0][ROWS-1:0][COLS-1:0]    c_inv,
  input  se_cfg_t [TR-1:0][TC-1:0][DIA_SES-1:0]           dia_cfg,
  input  logic    [TR-1:0][TC-1:0][63:0]                  lut_bits,
  input  logic    [TR-1:0][TC-1:0][1:0]                   lut_sc,
  input  logic    [NP-1:0]                                pin_in,
  input  logic    [NP-1:0]                                pin_oe,
  output logic    [NP-1:0]                                pin_out,
  output logic    [NP-1:0]                                pin_driven,
  output logic    [TR-1:0][TC-1:0]                        lb_out,
  output logic                                            settled,
  output logic                                            conflict
);
  localparam int unsigned NT  = TR*TC;                   // tiles
  localparam int unsigned NH  = (ROWS+1)*(COLS+1);       // h (or v) nodes per tile
  localparam int unsigned NPT = 2*NH + 4;                // nodes per tile
  localparam int unsigned N   = NT*NPT;
  localparam int unsigned NHS = (ROWS+1)*COLS;           // SEs on horizontal tracks
  localparam int unsigned NVS = ROWS*(COLS+1);           // SEs on vertical tracks
  localparam int unsigned ET  = NH + NHS + NVS + DIA_SES + 2;  // edges per tile
  localparam int unsigned NLH = TR*(TC-1)*(ROWS-1);
  localparam int unsigned NLV = (TR-1)*TC*(COLS+1);
  localparam int unsigned NDH = (TC > 2) ? TR*(TC-2) : 0;
  localparam int unsigned NDV = (TR > 2) ? (TR-2)*TC : 0;
  localparam int unsigned NW  = NLH + NLV + NDH + NDV;   // fixed wires
  localparam int unsigned E   = NT*ET + NW;
  localparam int unsigned IW  = 16;
  localparam int unsigned NB  = $clog2(N);             // node index bits

  // ---- node numbering ----
  function automatic int unsigned nh(int unsigned t, int unsigned r, int unsigned c);
    return t*NPT + r*(COLS+1) + c;
  endfunction
  function automatic int unsigned nv(int unsigned t, int unsigned r, int unsigned c);
    return t*NPT + NH + r*(COLS+1) + c;
  endfunction
  function automatic int unsigned nd(int unsigned t, dia_term_e k);
    return t*NPT + 2*NH + int'(k);
  endfunction
  function automatic int unsigned tid(int unsigned i, int unsigned j);
    return i*TC + j;
  endfunction

  // ---- edge list: side 0 gives the A ends, side 1 the B ends ----
  function automatic logic [E-1:0][IW-1:0] mk_edges(bit side);
    logic [E-1:0][IW-1:0] r_e;
    int unsigned e, a, b;
    r_e = '0;
    e = 0;
    for (int unsigned t = 0; t < NT; t++) begin
      for (int unsigned r = 0; r <= ROWS; r++)
        for (int unsigned c = 0; c <= COLS; c++) begin
          a = nh(t, r, c); b = nv(t, r, c);
          r_e[e] = IW'(side ? b : a); e++;
        end
      for (int unsigned r = 0; r <= ROWS; r++)
        for (int unsigned c = 0; c < COLS; c++) begin
          a = nh(t, r, c); b = nh(t, r, c+1);
          r_e[e] = IW'(side ? b : a); e++;
        end
      for (int unsigned r = 0; r < ROWS; r++)
        for (int unsigned c = 0; c <= COLS; c++) begin
          a = nv(t, r, c); b = nv(t, r+1, c);
          r_e[e] = IW'(side ? b : a); e++;
        end
      for (int unsigned k = 0; k < DIA_SES; k++) begin
        a = nd(t, dia_end_a(k)); b = nd(t, dia_end_b(k));
        r_e[e] = IW'(side ? b : a); e++;
      end
      a = nd(t, DIA_N); b = nv(t, ROWS, COLS);
      r_e[e] = IW'(side ? b : a); e++;
      a = nd(t, DIA_W); b = nh(t, ROWS, COLS);
      r_e[e] = IW'(side ? b : a); e++;
    end
    for (int unsigned i = 0; i < TR; i++)
      for (int unsigned j = 0; j + 1 < TC; j++)
        for (int unsigned r = 2; r <= ROWS; r++) begin
          a = nh(tid(i, j), r, COLS); b = nh(tid(i, j+1), r, 0);
          r_e[e] = IW'(side ? b : a); e++;
        end
    for (int unsigned i = 0; i + 1 < TR; i++)
      for (int unsigned j = 0; j < TC; j++)
        for (int unsigned c = 0; c <= COLS; c++) begin
          a = nv(tid(i, j), ROWS, c); b = nv(tid(i+1, j), 0, c);
          r_e[e] = IW'(side ? b : a); e++;
        end
    for (int unsigned i = 0; i < TR; i++)
      for (int unsigned j = 0; j + 2 < TC; j++) begin
        a = nd(tid(i, j), DIA_E); b = nd(tid(i, j+2), DIA_W);
        r_e[e] = IW'(side ? b : a); e++;
      end
    for (int unsigned i = 0; i + 2 < TR; i++)
      for (int unsigned j = 0; j < TC; j++) begin
        a = nd(tid(i, j), DIA_S); b = nd(tid(i+2, j), DIA_N);
        r_e[e] = IW'(side ? b : a); e++;
      end
    return r_e;
  endfunction

  // ---- pin list ----
  function automatic logic [NP-1:0][IW-1:0] mk_pins();
    logic [NP-1:0][IW-1:0] p;
    int unsigned k;
    p = '0;
    k = 0;
    for (int unsigned i = 0; i < TR; i++)
      for (int unsigned r = 2; r <= ROWS; r++) begin p[k] = IW'(nh(tid(i, 0), r, 0)); k++; end
    for (int unsigned i = 0; i < TR; i++)
      for (int unsigned r = 0; r <= ROWS; r++) begin p[k] = IW'(nh(tid(i, TC-1), r, COLS)); k++; end
    for (int unsigned j = 0; j < TC; j++)
      for (int unsigned c = 0; c <= COLS; c++) begin p[k] = IW'(nv(tid(0, j), 0, c)); k++; end
    for (int unsigned j = 0; j < TC; j++)
      for (int unsigned c = 0; c <= COLS; c++) begin p[k] = IW'(nv(tid(TR-1, j), ROWS, c)); k++; end
    for (int unsigned i = 0; i < TR; i++)
      for (int unsigned j = 0; j < TC; j++)
        if (j + 2 >= TC) begin p[k] = IW'(nd(tid(i, j), DIA_E)); k++; end
    for (int unsigned i = 0; i < TR; i++)
      for (int unsigned j = 0; j < TC; j++)
        if (i + 2 >= TR) begin p[k] = IW'(nd(tid(i, j), DIA_S)); k++; end
    return p;
  endfunction

  localparam logic [E-1:0][IW-1:0]  EA   = mk_edges(1'b0);
  localparam logic [E-1:0][IW-1:0]  EB   = mk_edges(1'b1);
  localparam logic [NP-1:0][IW-1:0] PINS = mk_pins();

  // ---- evaluation rounds ----
  logic [LEVELS:0][N-1:0] val;     // node values per round
  logic [LEVELS:0][N-1:0] drvn;    // node driven flags per round
  logic [LEVELS:0][N-1:0] cfl;     // node conflict flags per round
  logic [LEVELS:0][NT-1:0] lbz;    // LB outputs per round
  logic [LEVELS:0]         conv;   // resolution converged per round

  assign val[0]  = '0;
  assign drvn[0] = '0;
  assign cfl[0]  = '0;
  assign lbz[0]  = '0;
  assign conv[0] = 1'b1;

  for (genvar l = 1; l <= LEVELS; l++) begin : g_lvl
    logic [E-1:0] en;
    logic [N-1:0] d1, d0;
    logic [NT-1:0] z;

    for (genvar i = 0; i < TR; i++) begin : g_i
      for (genvar j = 0; j < TC; j++) begin : g_j
        localparam int unsigned T  = i*TC + j;
        localparam int unsigned EO = T*ET;

        logic [ROWS-1:0][COLS-1:0] hv;
        logic [ROWS:0][COLS:0]     p_on;
        logic [ROWS:0][COLS-1:0]   hse_on;
        logic [ROWS-1:0][COLS:0]   vse_on;
        logic [DIA_SES-1:0]        du, don;
        logic [5:0]                x;

        for (genvar r = 0; r < ROWS; r++) begin : g_hvr
          for (genvar c = 0; c < COLS; c++) begin : g_hvc
            assign hv[r][c] = val[l-1][nh(T, r, c)];
          end
        end

        rcm #(.ROWS(ROWS), .COLS(COLS), .FEPG(FEPG)) u_rcm (
          .p_mem   (p_mem[i][j]),
          .hse_cfg (hse_cfg[i][j]),
          .vse_cfg (vse_cfg[i][j]),
          .c_inv   (c_inv[i][j]),
          .h_val   (hv),
          .p_on    (p_on),
          .hse_on  (hse_on),
          .vse_on  (vse_on)
        );

        for (genvar k = 0; k < DIA_SES; k++) begin : g_du
          assign du[k] = val[l-1][T*NPT + NH - 2 - k];
        end

        diamond_switch #(.FEPG(FEPG)) u_dia (
          .cfg (dia_cfg[i][j]),
          .u   (du),
          .on  (don)
        );

        for (genvar k = 0; k < 6; k++) begin : g_x
          assign x[k] = val[l-1][T*NPT + NH + k];
        end

        adaptive_lb u_lb (
          .lut_bits (lut_bits[i][j]),
          .sc       (lut_sc[i][j]),
          .ctx      (ctx),
          .x        (x),
          .z        (z[T])
        );

        assign en[EO +: NH]                         = p_on;
        assign en[EO + NH +: NHS]                   = hse_on;
        assign en[EO + NH + NHS +: NVS]             = vse_on;
        assign en[EO + NH + NHS + NVS +: DIA_SES]   = don;
        assign en[EO + NH + NHS + NVS + DIA_SES +: 2] = 2'b11;
      end
    end

    if (NW > 0) begin : g_wires
      assign en[NT*ET +: NW] = '1;
    end

    // drivers: context-ID wires, LB outputs, pins
    always_comb begin
      d1 = '0;
      d0 = '0;
      for (int unsigned t = 0; t < NT; t++) begin
        d1[nh(t, 0, 0)] = ctx[1];
        d0[nh(t, 0, 0)] = ~ctx[1];
        d1[nh(t, 1, 0)] = ctx[0];
        d0[nh(t, 1, 0)] = ~ctx[0];
        d1[nv(t, 1, COLS)] = z[t];
        d0[nv(t, 1, COLS)] = ~z[t];
      end
      for (int unsigned k = 0; k < NP; k++) begin
        if (pin_oe[k]) begin
          d1[PINS[k][NB-1:0]] = d1[PINS[k][NB-1:0]] | pin_in[k];
          d0[PINS[k][NB-1:0]] = d0[PINS[k][NB-1:0]] | ~pin_in[k];
        end
      end
    end

    pass_net #(.N(N), .E(E), .IW(IW), .ITER(SWEEPS), .EA(EA), .EB(EB)) u_net (
      .en       (en),
      .drv1     (d1),
      .drv0     (d0),
      .val      (val[l]),
      .driven   (drvn[l]),
      .conflict (cfl[l]),
      .converged (conv[l])
    );

    assign lbz[l] = z;
  end

  // ---- outputs ----
  for (genvar k = 0; k < NP; k++) begin : g_pin
    assign pin_out[k]    = val[LEVELS][PINS[k][NB-1:0]];
    assign pin_driven[k] = drvn[LEVELS][PINS[k][NB-1:0]];
  end

  for (genvar i = 0; i < TR; i++) begin : g_lo
    for (genvar j = 0; j < TC; j++) begin : g_lj
      assign lb_out[i][j] = lbz[LEVELS][i*TC + j];
    end
  end

  assign settled  = (val[LEVELS] == val[LEVELS-1]) && (drvn[LEVELS] == drvn[LEVELS-1])
                 && (lbz[LEVELS] == lbz[LEVELS-1]) && conv[LEVELS];
  assign conflict = |cfl[LEVELS];

  // The tile wiring above needs at least two cell rows (context-ID rows 0
  // and 1 plus a shared row), three cell columns (LB inputs and output on
  // distinct nodes) and one evaluation round.
  if (ROWS < 2 || COLS < 3 || LEVELS < 1) begin : g_bad_param
    $error("mc_fpga: ROWS >= 2, COLS >= 3 and LEVELS >= 1 are required");
  end
endmodule
