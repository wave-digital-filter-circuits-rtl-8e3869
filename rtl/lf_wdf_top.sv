// lf_wdf_top: 4-D light-field depth filtering with wave-digital filters, both variants.
//
// An 8-bit raster-scanned light field (N_S x N_T cameras of N_U x N_V pixels, n_s
// fastest) enters one sample per clock. Each pixel p becomes the wave p/256 in Q2.13
// and feeds, side by side,
//   - the non-separable filter (two 4-D hyperplanar WDF sections), and
//   - the partially-separable filter (an s-u and a t-v 2-D WDF section).
// Both outputs are Q2.13 waves, one per input sample, two clocks after it; *_last marks
// the last sample of each light field. Throughput is one sample per clock, i.e.
// F_clk / (N_S*N_T*N_U*N_V) light fields per second.
// The multiplier sets are inputs so that the passband can be retuned to another depth
// without rebuilding; wdf_pkg holds the example sets.
//
// Both architectures and the light-field size (11 x 11 x 128 x 128) follow the published
// design; placing them side by side on one input stream is this design's choice.
module lf_wdf_top
  import wdf_pkg::*;
#(
  parameter int N_S = 11,
  parameter int N_T = 11,
  parameter int N_U = 128,
  parameter int N_V = 128
) (
  input  logic     clk,
  input  logic     rst,
  input  ns_coef_t ns_coef1,
  input  ns_coef_t ns_coef2,
  input  ps_coef_t ps_coef,
  input  logic     in_valid,
  input  pix_t     in_pix,
  output logic     ns_valid,
  output sys_t     ns_data,
  output logic     ns_last,
  output logic     ps_valid,
  output sys_t     ps_data,
  output logic     ps_last
);

  sys_t x;
  assign x = pix_to_sys(in_pix);

  wdf_ns_filter #(.N_S(N_S), .N_T(N_T), .N_U(N_U), .N_V(N_V)) u_ns (
    .clk(clk), .rst(rst), .coef1(ns_coef1), .coef2(ns_coef2),
    .in_valid(in_valid), .in_data(x),
    .out_valid(ns_valid), .out_data(ns_data), .out_last(ns_last));

  wdf_ps_filter #(.N_S(N_S), .N_T(N_T), .N_U(N_U), .N_V(N_V)) u_ps (
    .clk(clk), .rst(rst), .coef(ps_coef),
    .in_valid(in_valid), .in_data(x),
    .out_valid(ps_valid), .out_data(ps_data), .out_last(ps_last));

endmodule
