// mcmg_lut: multi-context multi-granularity look-up table.
//
// The LUT holds 2**(DATA_IN+SEL_IN) memory bits (64 by default) in 2**DATA_IN
// groups of 2**SEL_IN bits. Inside each group a small multiplexer tree,
// steered by the plane-select lines sel[], picks one bit; the group outputs
// then feed a 2**DATA_IN-to-1 multiplexer steered by the computation inputs
// data[]. Bit k of every group together form configuration plane P(k+1).
//
// What the plane-select lines carry decides the LUT's shape: both context-ID
// bits give a 4-input LUT with four planes, one context-ID bit and one
// computation input give a 5-input LUT with two planes, two computation
// inputs a 6-input LUT with one plane. The memory bit count never changes.
// Bit index of the selected memory bit: {data, sel}. Combinational.
//
// The 16 groups of four bits, the two-level select trees and the 16-to-1
// output multiplexer follow the LUT description; the bit order inside a
// group, and so which bit belongs to which plane, is this design's choice.
module mcmg_lut #(
  parameter int unsigned DATA_IN = 4,   // inputs of the final multiplexer
  parameter int unsigned SEL_IN  = 2    // plane-select lines
) (
  input  logic [2**(DATA_IN+SEL_IN)-1:0] bits,  // configuration memory
  input  logic [DATA_IN-1:0]             data,  // computation inputs
  input  logic [SEL_IN-1:0]              sel,   // plane-select lines
  output logic                           z
);
  localparam int unsigned GROUP = 2**SEL_IN;
  localparam int unsigned NGRP  = 2**DATA_IN;

  logic [NGRP-1:0] grp_out;

  // Plane-select trees, one per group.
  for (genvar gi = 0; gi < NGRP; gi++) begin : g_grp
    logic [GROUP-1:0] gbits;
    assign gbits       = bits[gi*GROUP +: GROUP];
    assign grp_out[gi] = gbits[sel];
  end

  // Final multiplexer over the computation inputs.
  always_comb z = grp_out[data];
endmodule
