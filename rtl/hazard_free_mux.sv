// hazard_free_mux: 2:1 multiplexer in AND-OR form, f = x.y + x'.z, with
// the consensus term y.z added.
//
// Functionally f is y when x is 1 and z when x is 0. In the plain two-term
// form, when y = z = 1 and x falls, the x.y term can drop before the x'.z
// term rises (the inverter delays x'), and f shows a short 0 pulse. The
// extra term y.z stays 1 throughout that change and holds f at 1. The
// hazard and its cure are the lecture's. The term is logically redundant,
// so a synthesis tool may remove it; where a glitch-free signal matters,
// registering it (as the lecture also advises) is the robust fix. Purely
// combinational; no clock.
module hazard_free_mux (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic f
);

  logic x_n, t_xy, t_xnz, t_yz;

  assign x_n   = ~x;
  assign t_xy  = x & y;
  assign t_xnz = x_n & z;
  assign t_yz  = y & z;          // consensus term
  assign f     = t_xy | t_xnz | t_yz;

endmodule
