// fepg_se: switch element built from a ferroelectric functional pass-gate
// (FePG), the compact non-volatile alternative to the CMOS switch element.
//
// The FePG merges storage and logic: one configuration bit (d0) lives in a
// ferroelectric device, the other (d1) in an ordinary memory bit. Its truth
// table differs from the CMOS SE's: d1 == d0 passes the variable input U,
// d1 d0 = 01 gives constant 0 and 10 gives constant 1, i.e. G = U when the
// two bits agree and G = d1 otherwise. This is the equivalent logic
// function of the device; the ferroelectric write path (WL, RL, BLW) is not
// modelled here, d0 is taken as a held input. Combinational.
module fepg_se (
  input  logic d1,  // CMOS memory bit
  input  logic d0,  // bit held in the ferroelectric device
  input  logic u,   // variable input U
  output logic g    // pass-gate control
);
  always_comb g = (d1 ~^ d0) ? u : d1;
endmodule
