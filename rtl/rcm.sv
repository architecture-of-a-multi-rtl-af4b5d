// rcm: reconfigurable context memory (RCM) switch block.
//
// The block is a mesh of ROWS+1 horizontal and COLS+1 vertical tracks.
// At every crossing (r,c) a programmable switch P, with one memory bit,
// joins the horizontal and vertical track. Between crossings each track
// segment is cut by a switch element (SE) whose pass-gate joins the two
// neighbouring crossings. Each cell (r,c) -- the square between crossings
// (r,c) and (r+1,c+1) -- holds an input controller C that reads the
// horizontal track at crossing (r,c) and drives, optionally inverted, the
// variable input U of the SE on the cell's bottom edge and of the SE on its
// right edge. SEs on the top row and left column have no controller and
// act as fixed on/off switches (U reads 0).
//
// Because SEs can pass track signals to other SEs' gates, the same mesh
// carries data and decodes the context ID into context-dependent
// configuration bits: a pattern that never changes costs one SE set to a
// constant, a pattern equal to S0, S1 or their inverse costs one SE fed by
// a controller, and the rare patterns that need both bits are built as a
// small pass-gate multiplexer from several SEs.
//
// This module turns memory bits and the present track values into the
// on/off state of every pass-gate; the pass-gates themselves are resolved
// by pass_net. Crossing (r,c) has two nodes, the horizontal track h(r,c) and
// the vertical track v(r,c); only h(r,c) of each cell is read here, by the
// cell's controller. Combinational.
//
// With FEPG = 1 every SE is a ferroelectric functional pass-gate (fepg_se)
// instead of the CMOS multiplexer; the two memory bits of each SE then hold
// the FePG's d1/d0 (equal bits pass U, 01 gives 0, 10 gives 1).
//
// The mesh, the P/SE/C roles and the SE behaviour follow the RCM description
// and its drawings; which SEs a controller feeds and which track it reads
// are this design's reading of the drawings.
module rcm
  import rcm_pkg::*;
#(
  parameter int unsigned ROWS = 2,    // cell rows
  parameter int unsigned COLS = 3,    // cell columns
  parameter bit          FEPG = 1'b0  // 1: SEs are ferroelectric functional pass-gates
) (
  // memory bits
  input  logic    [ROWS:0][COLS:0]     p_mem,   // P at each crossing
  input  se_cfg_t [ROWS:0][COLS-1:0]   hse_cfg, // SEs on horizontal tracks
  input  se_cfg_t [ROWS-1:0][COLS:0]   vse_cfg, // SEs on vertical tracks
  input  logic    [ROWS-1:0][COLS-1:0] c_inv,   // input controllers
  // present value of the horizontal track at crossing (r,c) of each cell,
  // read by the cell's input controller
  input  logic    [ROWS-1:0][COLS-1:0] h_val,
  // pass-gate states (1 = conducting)
  output logic    [ROWS:0][COLS:0]     p_on,    // joins h(r,c) and v(r,c)
  output logic    [ROWS:0][COLS-1:0]   hse_on,  // joins h(r,c) and h(r,c+1)
  output logic    [ROWS-1:0][COLS:0]   vse_on   // joins v(r,c) and v(r+1,c)
);
  logic [ROWS-1:0][COLS-1:0] cu;  // controller outputs

  assign p_on = p_mem;

  for (genvar r = 0; r < ROWS; r++) begin : g_cr
    for (genvar c = 0; c < COLS; c++) begin : g_cc
      input_controller u_c (
        .inv (c_inv[r][c]),
        .a   (h_val[r][c]),
        .u   (cu[r][c])
      );
    end
  end

  for (genvar r = 0; r <= ROWS; r++) begin : g_hr
    for (genvar c = 0; c < COLS; c++) begin : g_hc
      logic u;
      if (r == 0) begin : g_noc
        assign u = 1'b0;
      end else begin : g_c
        assign u = cu[r-1][c];
      end
      if (FEPG) begin : g_fe
        fepg_se u_se (.d1(hse_cfg[r][c].d1), .d0(hse_cfg[r][c].d0), .u(u), .g(hse_on[r][c]));
      end else begin : g_cmos
        switch_element u_se (.cfg(hse_cfg[r][c]), .u(u), .g(hse_on[r][c]));
      end
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_vr
    for (genvar c = 0; c <= COLS; c++) begin : g_vc
      logic u;
      if (c == 0) begin : g_noc
        assign u = 1'b0;
      end else begin : g_c
        assign u = cu[r][c-1];
      end
      if (FEPG) begin : g_fe
        fepg_se u_se (.d1(vse_cfg[r][c].d1), .d0(vse_cfg[r][c].d0), .u(u), .g(vse_on[r][c]));
      end else begin : g_cmos
        switch_element u_se (.cfg(vse_cfg[r][c]), .u(u), .g(vse_on[r][c]));
      end
    end
  end
endmodule
