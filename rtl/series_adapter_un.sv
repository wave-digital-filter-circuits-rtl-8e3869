// series_adapter_un: unconstrained 3-port series wave-digital adapter.
//
// Ports 1, 2, 3 have resistances R1, R2, R3 that are all free; the adapter is set by two
// multipliers, g1 = 2R1/(R1+R2+R3) and g3 = 2R3/(R1+R2+R3) (the third, 2 - g1 - g3, is
// implicit). With a0 = a1 + a2 + a3,
//   b1 = a1 - g1*a0,   b3 = a3 - g3*a0,   b2 = -(a0 + b1 + b3).
// In the filters port 2 is the inductor; ports 1 and 3 face the neighbouring adapters or
// the load. Both g values may exceed 1, hence the Q2.11 coefficient format.
//
// Purely combinational. Products are truncated toward zero to 13 fraction bits, outputs saturated.
// The two-multiplier form follows the published description of the unconstrained adapter;
// the adder arrangement is this design's choice.
module series_adapter_un
  import wdf_pkg::*;
(
  input  coef_t g1,
  input  coef_t g3,
  input  sys_t  a1,
  input  sys_t  a2,
  input  sys_t  a3,
  output sys_t  b1,
  output sys_t  b2,
  output sys_t  b3
);

  acc_t a0, b1_w, b3_w;

  always_comb begin
    a0   = wide(a1) + wide(a2) + wide(a3);
    b1_w = wide(a1) - cmul(g1, a0);
    b3_w = wide(a3) - cmul(g3, a0);
    b1   = sat(b1_w);
    b3   = sat(b3_w);
    b2   = sat(-(a0 + b1_w + b3_w));
  end

endmodule
