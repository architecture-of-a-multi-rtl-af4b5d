// adaptive_lb: adaptive multi-context logic block.
//
// A locally controlled MCMG-LUT: each of its plane-select lines has its own
// size controller, so each block independently chooses its LUT size and
// number of configuration planes:
//   sc = 2'b11 : 4-input LUT, four planes picked by {S1,S0}
//   sc = 2'b01 : 5-input LUT (x[5] is the 5th input), two planes picked by S0
//   sc = 2'b10 : 5-input LUT (x[4] is the 5th input), two planes picked by S1
//   sc = 2'b00 : 6-input LUT, one plane
// Inputs x[3:0] always drive the final multiplexer; x[4] and x[5] are used
// only when the matching size controller selects data. Memory bit layout is
// that of mcmg_lut: index {x[3:0], sel1, sel0}. Combinational.
//
// The 4/5-input shapes and the dedicated size controller follow the
// architecture; the 6-input single-plane shape follows from its rule that
// fewer planes give a larger LUT. One output is built: a second output of
// the evaluated 6-input 2-output LUT is not described. No flip-flop.
module adaptive_lb
  import rcm_pkg::*;
(
  input  logic [63:0] lut_bits,  // LUT configuration memory
  input  logic [1:0]  sc,        // size-controller memory bits (sc[b] for sel b)
  input  ctx_id_t     ctx,       // context ID {S1, S0}
  input  logic [5:0]  x,         // computation inputs
  output logic        z
);
  logic [1:0] sel;

  for (genvar b = 0; b < 2; b++) begin : g_sc
    size_controller u_sc (
      .mem  (sc[b]),
      .ctx  (ctx[b]),
      .data (x[4+b]),
      .sel  (sel[b])
    );
  end

  mcmg_lut #(.DATA_IN(4), .SEL_IN(2)) u_lut (
    .bits (lut_bits),
    .data (x[3:0]),
    .sel  (sel),
    .z    (z)
  );
endmodule
