// rcm_pkg: constants and types shared by the multi-context FPGA blocks.
//
// The fabric has four contexts selected by a two-bit context ID {S1, S0}
// (context n is selected when {S1,S0} == n). The diamond switch joins four
// line ends, named by compass direction, through six switch elements whose
// variable inputs are U1..U6; the pairs each SE joins follow the drawing of
// the diamond switch (U1 top-left edge, U2 top-right, U3 bottom-right,
// U4 bottom-left, U5 the horizontal bar, U6 the vertical bar).
package rcm_pkg;

  localparam int unsigned NUM_CONTEXTS = 4;
  localparam int unsigned CTX_BITS     = $clog2(NUM_CONTEXTS);

  typedef logic [CTX_BITS-1:0] ctx_id_t;

  // Line ends of a diamond switch.
  typedef enum logic [1:0] {
    DIA_N = 2'd0,
    DIA_E = 2'd1,
    DIA_S = 2'd2,
    DIA_W = 2'd3
  } dia_term_e;

  localparam int unsigned DIA_SES = 6;

  // End points of the pass-gate controlled by SE k (k = 0 is U1).
  function automatic dia_term_e dia_end_a(input int unsigned k);
    case (k)
      0: return DIA_N;   // U1: N-W
      1: return DIA_N;   // U2: N-E
      2: return DIA_E;   // U3: E-S
      3: return DIA_S;   // U4: S-W
      4: return DIA_W;   // U5: W-E
      default: return DIA_N; // U6: N-S
    endcase
  endfunction

  function automatic dia_term_e dia_end_b(input int unsigned k);
    case (k)
      0: return DIA_W;
      1: return DIA_E;
      2: return DIA_S;
      3: return DIA_W;
      4: return DIA_E;
      default: return DIA_S;
    endcase
  endfunction

  // Configuration of one switch element: D1 = 1 selects the variable
  // input U, D1 = 0 selects the constant D0.
  typedef struct packed {
    logic d1;
    logic d0;
  } se_cfg_t;

endpackage
