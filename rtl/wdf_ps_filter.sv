// wdf_ps_filter: 4-D partially-separable planar depth filter.
//
// When each hyperplane of the planar passband depends on only two dimensions, the 4-D
// hyperplanar sections reduce to 2-D ones: a first-order 2-D wave-digital section in
// (s, u) followed by one in (t, v). Each costs two adapters and two inductors instead
// of four of each, yet the cascade still passes the plane set by the object depth.
//
// Interface: one Q2.13 sample per clock in; the filtered sample comes out two clocks
// later. coef.su and coef.tv are the multiplier sets of the two sections.
// The split into an s-u and a t-v section follows the published architecture.
module wdf_ps_filter
  import wdf_pkg::*;
#(
  parameter int N_S = 11,
  parameter int N_T = 11,
  parameter int N_U = 128,
  parameter int N_V = 128
) (
  input  logic     clk,
  input  logic     rst,
  input  ps_coef_t coef,
  input  logic     in_valid,
  input  sys_t     in_data,
  output logic     out_valid,
  output sys_t     out_data,
  output logic     out_last
);

  logic mid_valid, mid_last;
  sys_t mid_data;

  wdf_2d_section #(.N_S(N_S), .N_T(N_T), .N_U(N_U), .N_V(N_V), .PAIR(PAIR_SU)) u_su (
    .clk(clk), .rst(rst), .coef(coef.su),
    .in_valid(in_valid), .in_data(in_data),
    .out_valid(mid_valid), .out_data(mid_data), .out_last(mid_last));

  wdf_2d_section #(.N_S(N_S), .N_T(N_T), .N_U(N_U), .N_V(N_V), .PAIR(PAIR_TV)) u_tv (
    .clk(clk), .rst(rst), .coef(coef.tv),
    .in_valid(mid_valid), .in_data(mid_data),
    .out_valid(out_valid), .out_data(out_data), .out_last(out_last));

  property p_lf_aligned;
    @(posedge clk) disable iff (rst) out_valid |-> (out_last == $past(mid_last));
  endproperty
  assert property (p_lf_aligned);

endmodule
