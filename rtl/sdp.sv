// sdp: spatial delay processor, the wave-digital model of one inductor of the 4-D
// prototype network together with its zero-initial-condition (ZIC) multiplexer.
//
// A WDF inductor reflects its incident wave delayed by one sample and negated. Here the
// delay is one unit step along one light-field dimension, i.e. DELAY samples of the
// raster scan, so the wave b_in that the adapter sends toward the inductor is stored in
// a delay line, and the wave a_out returned to the adapter is minus that stored value.
// Where the delayed sample would lie outside the light-field grid (zic = 1) the
// multiplexer returns zero instead, which imposes zero initial conditions on that edge.
//
// Interface: b_in is written on cycles with en = 1; a_out is combinational from the
// delay-line register and the zic flag of the sample being processed in that cycle.
// Structure (delay, scaling by -1, ZIC multiplexer) follows the published SDP circuits;
// negation saturates (-(-2) -> largest positive wave), which is this design's choice.
module sdp
  import wdf_pkg::*;
#(
  parameter int DELAY = 1
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic zic,
  input  sys_t b_in,
  output sys_t a_out
);

  logic [W_SYS-1:0] delayed;

  delay_line #(.W(W_SYS), .DELAY(DELAY)) u_delay (
    .clk  (clk),
    .rst  (rst),
    .en   (en),
    .din  (b_in),
    .dout (delayed)
  );

  always_comb begin
    if (zic) a_out = '0;
    else     a_out = sat(-wide(sys_t'(delayed)));
  end

endmodule
