// delay_line: delay of DELAY samples on a raster-scanned stream (one multidimensional
// unit delay, z^-1 along one light-field dimension).
//
// The line advances only on cycles with en = 1, so gaps in the input stream do not
// disturb the delay. For DELAY = 1 it is a single register. For longer delays it is a
// circular buffer read one sample ahead into a register, so the memory has one write
// and one synchronous read port (block-RAM friendly): on every enabled cycle the word
// at the write pointer is replaced by din and the word that the next sample will need
// is read into dout.
//
// Timing: dout holds the din of DELAY enabled cycles ago, valid from the cycle after
// the en cycle that loaded it. The first DELAY outputs after reset are undefined memory
// contents; users mask them (the zero-initial-condition multiplexers do).
// The published architecture builds these delays from FIFO buffers and a z^-1 block;
// the read-ahead buffer organisation is this design's choice.
module delay_line #(
  parameter int W     = 15,
  parameter int DELAY = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  if (DELAY == 1) begin : g_reg
    always_ff @(posedge clk) begin
      if (rst)     dout <= '0;
      else if (en) dout <= din;
    end
  end else begin : g_ram
    localparam int AW = $clog2(DELAY);
    logic [W-1:0]  mem [DELAY];
    logic [AW-1:0] wptr;
    logic [AW-1:0] rptr;

    assign rptr = (wptr == AW'(DELAY - 1)) ? '0 : wptr + 1'b1;

    always_ff @(posedge clk) begin
      if (rst) wptr <= '0;
      else if (en) wptr <= rptr;
    end

    always_ff @(posedge clk) begin
      if (en) mem[wptr] <= din;
    end

    always_ff @(posedge clk) begin
      if (rst)     dout <= '0;
      else if (en) dout <= mem[rptr];
    end
  end

endmodule
