// wdf_2d_section: first-order 2-D hyperplanar wave-digital filter acting on two of the
// four dimensions of a raster-scanned light field (PAIR_SU: s and u; PAIR_TV: t and v).
//
// Prototype: source R, inductors L1 and L2 (one per filtered dimension) and load R in
// series. Wave-digital version: a reflection-free series adapter (g_src on the source
// port) with inductor L1, whose matched port feeds an unconstrained series adapter with
// inductor L2 (g_in on the port toward the first adapter, g_load on the load port, whose
// incident wave is 0). The output is the wave the second adapter sends into the load.
// Per sample: the first adapter's matched-port wave goes forward, the unconstrained
// adapter answers, and the first adapter then completes with that answer.
// The inductors are sdp blocks whose delays are one unit step along the filtered
// dimensions: 1 and N_S*N_T samples for s and u, N_S and N_S*N_T*N_U samples for t and v.
//
// Interface and timing as wdf_ns_section: one sample per clock, output registered one
// clock after the input, in_valid gaps hold the state.
// The adapter topology and the coefficient roles follow the published realization; the
// handshake and register placement are this design's choice.
module wdf_2d_section
  import wdf_pkg::*;
#(
  parameter int    N_S  = 11,
  parameter int    N_T  = 11,
  parameter int    N_U  = 128,
  parameter int    N_V  = 128,
  parameter pair_e PAIR = PAIR_SU
) (
  input  logic        clk,
  input  logic        rst,
  input  sec2d_coef_t coef,
  input  logic        in_valid,
  input  sys_t        in_data,
  output logic        out_valid,
  output sys_t        out_data,
  output logic        out_last
);

  localparam int D1 = (PAIR == PAIR_SU) ? 1 : N_S;
  localparam int D2 = (PAIR == PAIR_SU) ? N_S * N_T : N_S * N_T * N_U;

  zic_t zic;
  logic last;
  logic zic1, zic2;

  scan_counter #(.N_S(N_S), .N_T(N_T), .N_U(N_U), .N_V(N_V)) u_scan (
    .clk(clk), .rst(rst), .en(in_valid),
    .n_s(), .n_t(), .n_u(), .n_v(),
    .zic(zic), .last(last), .first_lf()
  );

  assign zic1 = (PAIR == PAIR_SU) ? zic.s : zic.t;
  assign zic2 = (PAIR == PAIR_SU) ? zic.u : zic.v;

  sys_t a_l1, a_l2, b_l1, b_l2;

  sdp #(.DELAY(D1)) u_sdp_1 (
    .clk(clk), .rst(rst), .en(in_valid), .zic(zic1), .b_in(b_l1), .a_out(a_l1));
  sdp #(.DELAY(D2)) u_sdp_2 (
    .clk(clk), .rst(rst), .en(in_valid), .zic(zic2), .b_in(b_l2), .a_out(a_l2));

  sys_t fwd, back, y;

  series_adapter_rf u_a1 (
    .g1(coef.g_src), .a1(in_data), .a2(a_l1), .a3(back),
    .b1(),  // reflected wave is absorbed by the source resistance
    .b2(b_l1), .b3(fwd));

  series_adapter_un u_a2 (
    .g1(coef.g_in), .g3(coef.g_load), .a1(fwd), .a2(a_l2), .a3('0),
    .b1(back), .b2(b_l2), .b3(y));

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
