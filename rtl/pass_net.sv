// pass_net: two-state model of a network of bidirectional pass-gates.
//
// N nodes (track segments) are joined by E edges; edge e joins nodes EA[e]
// and EB[e] while en[e] is 1 (a closed pass-gate or a plain wire). Nodes
// may be driven to 1 (drv1) or 0 (drv0). Every node takes the value driven
// anywhere in its connected component: val = some 1 driver reaches it,
// driven = some driver reaches it, conflict = both a 0 and a 1 driver reach
// it. An undriven (floating) component reads 0 and has driven = 0.
//
// Resolution runs ITER sweeps over the edge list, alternately in forward
// and backward order; each sweep carries the reached sets along every
// closed edge in turn. A sweep that changes nothing means the fixed point is
// reached, and `converged` reports that the last sweep changed nothing. With
// ITER = N the fixed point is always reached; smaller values are enough for
// short routes and `converged` tells when they are not. Combinational.
//
// The architecture describes the pass-gates (inside SEs and programmable
// switches) but not how to simulate them; this two-state network model is
// this design's own.
module pass_net #(
  parameter int unsigned N    = 2,
  parameter int unsigned E    = 1,
  parameter int unsigned IW   = 16,                   // node index width
  parameter int unsigned ITER = N,
  parameter logic [E-1:0][IW-1:0] EA = '0,
  parameter logic [E-1:0][IW-1:0] EB = {E{IW'(1)}}
) (
  input  logic [E-1:0] en,
  input  logic [N-1:0] drv1,
  input  logic [N-1:0] drv0,
  output logic [N-1:0] val,
  output logic [N-1:0] driven,
  output logic [N-1:0] conflict,
  output logic         converged
);
  localparam int unsigned NW = (N > 1) ? $clog2(N) : 1;

  logic [ITER:0][N-1:0] s1, s0;   // reached-by-1 / reached-by-0 after each sweep

  assign s1[0] = drv1;
  assign s0[0] = drv0;

  for (genvar it = 0; it < ITER; it++) begin : g_sweep
    always_comb begin
      logic [N-1:0] h1, h0;
      logic [NW-1:0] a, b;
      int unsigned  k;
      h1 = s1[it];
      h0 = s0[it];
      for (int unsigned e = 0; e < E; e++) begin
        k = (it % 2 == 0) ? e : E - 1 - e;
        a = EA[k][NW-1:0];
        b = EB[k][NW-1:0];
        if (en[k]) begin
          h1[a] = h1[a] | h1[b];
          h1[b] = h1[a];
          h0[a] = h0[a] | h0[b];
          h0[b] = h0[a];
        end
      end
      s1[it+1] = h1;
      s0[it+1] = h0;
    end
  end

  assign val       = s1[ITER];
  assign driven    = s1[ITER] | s0[ITER];
  assign conflict  = s1[ITER] & s0[ITER];
  if (ITER > 0) begin : g_conv
    assign converged = (s1[ITER] == s1[ITER-1]) && (s0[ITER] == s0[ITER-1]);
  end else begin : g_noconv
    assign converged = (drv1 == '0) && (drv0 == '0);
  end
endmodule
