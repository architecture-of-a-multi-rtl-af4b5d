// input_controller: the input controller (C) of a reconfigurable context
// memory cell.
//
// It takes the value of a track (typically a context-ID bit routed through
// the RCM, or a configuration bit decoded from it) and hands it to the
// variable inputs U of the switch elements of its cell, inverted when its
// memory bit INV is set. Inversion lets one track serve both the S and
// not-S patterns of a context-ID bit. Combinational.
//
// The architecture gives only its function (it can invert its input); the
// single memory bit and the inverter-or-buffer form are this design's.
module input_controller (
  input  logic inv,  // memory bit: 1 inverts
  input  logic a,    // track value
  output logic u     // to SE variable inputs
);
  always_comb u = inv ? ~a : a;
endmodule
