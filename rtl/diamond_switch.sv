// diamond_switch: switch joining the ends of double-length lines.
//
// Four line ends meet at the corners of a diamond (N, E, S, W). Six switch
// elements sit on the four sides and the two diagonals, so any end can be
// joined to any of the other three. The SEs' variable inputs U1..U6 come
// from the neighbouring RCM, so the diamond's connections can be constant
// or follow the context ID like any RCM switch. Outputs are the pass-gate
// states; on[k] joins ends rcm_pkg::dia_end_a(k) and dia_end_b(k):
// U1 N-W, U2 N-E, U3 E-S, U4 S-W, U5 W-E, U6 N-S. With FEPG = 1 the SEs
// are ferroelectric functional pass-gates and cfg holds their d1/d0.
// Combinational.
//
// The six SEs and their U1..U6 positions follow the diamond-switch
// drawing; which RCM nodes drive U1..U6 is chosen in mc_fpga.
module diamond_switch
  import rcm_pkg::*;
#(
  parameter bit FEPG = 1'b0  // 1: SEs are ferroelectric functional pass-gates
) (
  input  se_cfg_t [DIA_SES-1:0] cfg,  // SE memory bits
  input  logic    [DIA_SES-1:0] u,    // U1..U6 (u[0] is U1)
  output logic    [DIA_SES-1:0] on    // pass-gate states
);
  for (genvar k = 0; k < DIA_SES; k++) begin : g_se
    if (FEPG) begin : g_fe
      fepg_se u_se (.d1(cfg[k].d1), .d0(cfg[k].d0), .u(u[k]), .g(on[k]));
    end else begin : g_cmos
      switch_element u_se (.cfg(cfg[k]), .u(u[k]), .g(on[k]));
    end
  end
endmodule
