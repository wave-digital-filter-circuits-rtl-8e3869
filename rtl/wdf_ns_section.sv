// wdf_ns_section: one first-order 4-D non-separable hyperplanar wave-digital filter on a
// raster-scanned light field (one sample per clock).
//
// Prototype: a source of resistance R driving a load R through four series inductors
// Ls, Lt, Lu, Lv, one per dimension; its transmission 2R/(2R + sum Lk*sk) has a
// hyperplanar passband. The wave-digital version is a chain of four series adapters:
//   A1 (reflection-free, g1): source x, inductor Ls, matched port toward A2
//   A2 (reflection-free, g2): from A1, inductor Lt, matched port toward A3
//   A3 (unconstrained, g3 toward A2, g4 toward A4): inductor Lu
//   A4 (reflection-free, g5 on the load port): load (incident wave 0), inductor Lv,
//      matched port toward A3
// Evaluation per sample: the forward waves of A1 and A2 and the backward wave of A4
// (all from reflection-free ports) meet in A3; its reflected waves then run back out
// through A4 (giving the output y, the wave into the load) and through A2 and A1 (giving
// the new inductor waves). The wave A1 reflects into the source is not used.
// Each inductor is an sdp (delay of 1, N_S, N_S*N_T and N_S*N_T*N_U samples for s, t,
// u, v, times -1, zero at the grid edges given by scan_counter).
//
// Interface: in_valid/in_data present one Q2.13 sample; out_valid/out_data/out_last
// give the filtered sample one clock later (latency 1, throughput one sample per clock).
// Gaps in in_valid hold the filter state. coef may change between light fields.
// Adapter topology and coefficient roles follow the published WDF realization; the
// registered output and the valid handshake are this design's choice.
module wdf_ns_section
  import wdf_pkg::*;
#(
  parameter int N_S = 11,
  parameter int N_T = 11,
  parameter int N_U = 128,
  parameter int N_V = 128
) (
  input  logic     clk,
  input  logic     rst,
  input  ns_coef_t coef,
  input  logic     in_valid,
  input  sys_t     in_data,
  output logic     out_valid,
  output sys_t     out_data,
  output logic     out_last
);

  zic_t zic;
  logic last;

  scan_counter #(.N_S(N_S), .N_T(N_T), .N_U(N_U), .N_V(N_V)) u_scan (
    .clk(clk), .rst(rst), .en(in_valid),
    .n_s(), .n_t(), .n_u(), .n_v(),
    .zic(zic), .last(last), .first_lf()
  );

  // Inductor waves: a_* into the adapters, b_* back toward the inductors.
  sys_t a_ls, a_lt, a_lu, a_lv;
  sys_t b_ls, b_lt, b_lu, b_lv;

  sdp #(.DELAY(1)) u_sdp_s (
    .clk(clk), .rst(rst), .en(in_valid), .zic(zic.s), .b_in(b_ls), .a_out(a_ls));
  sdp #(.DELAY(N_S)) u_sdp_t (
    .clk(clk), .rst(rst), .en(in_valid), .zic(zic.t), .b_in(b_lt), .a_out(a_lt));
  sdp #(.DELAY(N_S*N_T)) u_sdp_u (
    .clk(clk), .rst(rst), .en(in_valid), .zic(zic.u), .b_in(b_lu), .a_out(a_lu));
  sdp #(.DELAY(N_S*N_T*N_U)) u_sdp_v (
    .clk(clk), .rst(rst), .en(in_valid), .zic(zic.v), .b_in(b_lv), .a_out(a_lv));

  // Waves between adapters (f: toward A3, r: away from A3).
  sys_t f12, f23, f43;
  sys_t r21, r32, r34;
  sys_t y;

  series_adapter_rf u_a1 (
    .g1(coef.g1), .a1(in_data), .a2(a_ls), .a3(r21),
    .b1(),  // reflected wave is absorbed by the source resistance
    .b2(b_ls), .b3(f12));

  series_adapter_rf u_a2 (
    .g1(coef.g2), .a1(f12), .a2(a_lt), .a3(r32),
    .b1(r21), .b2(b_lt), .b3(f23));

  series_adapter_un u_a3 (
    .g1(coef.g3), .g3(coef.g4), .a1(f23), .a2(a_lu), .a3(f43),
    .b1(r32), .b2(b_lu), .b3(r34));

  series_adapter_rf u_a4 (
    .g1(coef.g5), .a1('0), .a2(a_lv), .a3(r34),
    .b1(y), .b2(b_lv), .b3(f43));

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid && last;
      if (in_valid) out_data <= y;
    end
  end

endmodule
