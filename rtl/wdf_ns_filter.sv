// wdf_ns_filter: 4-D non-separable planar depth filter, a cascade of two first-order 4-D
// hyperplanar wave-digital sections (wdf_ns_section).
//
// Each section passes a 4-D hyperplane of the frequency domain set by its four
// inductances; the cascade passes their intersection, the plane on which the spectrum
// of a Lambertian object at the chosen depth lies. Each section has its own multiplier
// set (coef1, coef2) so the two hyperplanes can be tuned independently; the published
// example uses the same set for both.
//
// Interface: one Q2.13 sample per clock in; the filtered sample comes out two clocks
// later (one register per section). out_last marks the last sample of a light field.
// The cascade of two sections follows the published filter; the published FPGA build
// held only one section for lack of resources.
module wdf_ns_filter
  import wdf_pkg::*;
#(
  parameter int N_S = 11,
  parameter int N_T = 11,
  parameter int N_U = 128,
  parameter int N_V = 128
) (
  input  logic     clk,
  input  logic     rst,
  input  ns_coef_t coef1,
  input  ns_coef_t coef2,
  input  logic     in_valid,
  input  sys_t     in_data,
  output logic     out_valid,
  output sys_t     out_data,
  output logic     out_last
);

  logic mid_valid, mid_last;
  sys_t mid_data;

  wdf_ns_section #(.N_S(N_S), .N_T(N_T), .N_U(N_U), .N_V(N_V)) u_sec1 (
    .clk(clk), .rst(rst), .coef(coef1),
    .in_valid(in_valid), .in_data(in_data),
    .out_valid(mid_valid), .out_data(mid_data), .out_last(mid_last));

  wdf_ns_section #(.N_S(N_S), .N_T(N_T), .N_U(N_U), .N_V(N_V)) u_sec2 (
    .clk(clk), .rst(rst), .coef(coef2),
    .in_valid(mid_valid), .in_data(mid_data),
    .out_valid(out_valid), .out_data(out_data), .out_last(out_last));

  // The two sections count the same stream; a light field ends in both on the same sample.
  property p_lf_aligned;
    @(posedge clk) disable iff (rst) out_valid |-> (out_last == $past(mid_last));
  endproperty
  assert property (p_lf_aligned);

endmodule
