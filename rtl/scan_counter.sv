// scan_counter: position of the current sample in the raster-scanned 4-D light field.
//
// Samples arrive in the order k = n_s + n_t*N_S + n_u*N_S*N_T + n_v*N_S*N_T*N_U, so n_s
// runs fastest and n_v slowest. The counter holds the coordinates of the sample presented
// in the current cycle and steps to the next one on every cycle with en = 1; after the
// last sample of a light field it wraps to (0,0,0,0) and the next light field follows.
//
// zic flags the dimensions along which the sample one unit step back lies outside the
// grid: s, t and u are bounded, so their flag is set on the first index of that
// dimension in every light field. v is treated as unbounded: a light field continues
// the v recursion of the one before, and the v flag is set only on the first v plane of
// the first light field after reset, which stands for the zero-cleared buffer at start.
// last marks the final sample of a light field; first_lf is 1 during the first light
// field after reset.
//
// The scan order and the unbounded v dimension follow the published architecture; the
// single v mask of the first light field is this design's choice.
module scan_counter
  import wdf_pkg::*;
#(
  parameter int N_S = 11,
  parameter int N_T = 11,
  parameter int N_U = 128,
  parameter int N_V = 128
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   en,
  output logic [$clog2(N_S)-1:0] n_s,
  output logic [$clog2(N_T)-1:0] n_t,
  output logic [$clog2(N_U)-1:0] n_u,
  output logic [$clog2(N_V)-1:0] n_v,
  output zic_t                   zic,
  output logic                   last,
  output logic                   first_lf
);

  logic end_s, end_t, end_u, end_v;

  assign end_s = (n_s == ($clog2(N_S))'(N_S - 1));
  assign end_t = (n_t == ($clog2(N_T))'(N_T - 1));
  assign end_u = (n_u == ($clog2(N_U))'(N_U - 1));
  assign end_v = (n_v == ($clog2(N_V))'(N_V - 1));
  assign last  = end_s && end_t && end_u && end_v;

  always_ff @(posedge clk) begin
    if (rst) begin
      n_s      <= '0;
      n_t      <= '0;
      n_u      <= '0;
      n_v      <= '0;
      first_lf <= 1'b1;
    end else if (en) begin
      n_s <= end_s ? '0 : n_s + 1'b1;
      if (end_s) begin
        n_t <= end_t ? '0 : n_t + 1'b1;
        if (end_t) begin
          n_u <= end_u ? '0 : n_u + 1'b1;
          if (end_u) begin
            n_v <= end_v ? '0 : n_v + 1'b1;
            if (end_v) first_lf <= 1'b0;
          end
        end
      end
    end
  end

  always_comb begin
    zic.s = (n_s == '0);
    zic.t = (n_t == '0);
    zic.u = (n_u == '0);
    zic.v = (n_v == '0) && first_lf;
  end

endmodule
