// size_controller: local size controller of an MCMG-LUT.
//
// A 2-to-1 multiplexer under one memory bit drives one plane-select line of
// the LUT: memory bit 1 routes the context-ID bit (the LUT keeps separate
// configuration planes along this line), memory bit 0 routes a computation
// input (the line becomes an extra LUT input and the planes merge into one
// larger LUT). Combinational.
//
// Follows the size controller drawn for the locally controlled LUT; the
// architecture also allows forming it from RCM elements instead.
module size_controller (
  input  logic mem,    // memory bit
  input  logic ctx,    // context-ID bit (mux input 1)
  input  logic data,   // computation input (mux input 0)
  output logic sel     // plane-select line of the LUT
);
  always_comb sel = mem ? ctx : data;
endmodule
