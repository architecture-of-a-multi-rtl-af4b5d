// switch_element: the fine-grained switch element (SE) of the reconfigurable
// context memory.
//
// An SE is a 2-to-1 multiplexer steered by memory bit D1. With D1 = 0 it
// passes the constant memory bit D0, with D1 = 1 it passes the variable input
// U, which the fabric connects to a track that carries a context-ID bit or a
// decoded configuration bit. The output G drives the gate of the SE's
// pass-gate (G = 1 closes it); the pass-gate itself is resolved by the net
// model (pass_net) that sees G as an edge enable.
//
// Truth table (as in the switch-element description): D1 D0 = 1x -> U,
// 00 -> 0, 01 -> 1. Purely combinational.
module switch_element
  import rcm_pkg::*;
(
  input  se_cfg_t cfg,   // memory bits D1, D0
  input  logic    u,     // variable input U
  output logic    g      // pass-gate control
);
  always_comb g = cfg.d1 ? u : cfg.d0;
endmodule
