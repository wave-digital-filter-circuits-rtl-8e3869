// series_adapter_rf: reflection-free (constrained) 3-port series wave-digital adapter.
//
// Ports 1 and 2 have resistances R1 and R2; port 3 is matched to them, R3 = R1 + R2, so
// the wave it reflects, b3 = -(a1 + a2), does not depend on its own incident wave a3.
// That breaks the delay-free loop with the neighbouring adapter: b3 can be sent on
// before a3 comes back. With a0 = a1 + a2 + a3 and g1 = R1/R3 (the only multiplier),
//   b1 = a1 - g1*a0,   b3 = -(a1 + a2),   b2 = -(a0 + b1 + b3)
// which is b2 = a2 - (1 - g1)*a0 written without a second multiplier.
// In the filters port 1 is the port toward the source side, port 2 the inductor and
// port 3 the reflection-free port.
//
// Purely combinational. Products are truncated toward zero to 13 fraction bits and the outputs are
// saturated (see wdf_pkg). The one-multiplier reflection-free form is the standard WDF
// adapter the published architecture uses; the exact arrangement of the adders is this
// design's choice.
module series_adapter_rf
  import wdf_pkg::*;
(
  input  coef_t g1,
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
    b3_w = -(wide(a1) + wide(a2));
    b1   = sat(b1_w);
    b3   = sat(b3_w);
    b2   = sat(-(a0 + b1_w + b3_w));
  end

endmodule
