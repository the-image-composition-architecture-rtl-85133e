// Previous-row Z buffer: one scan line of Z bytes for one input stream.
//
// To see the two upper corners of a pixel the Compositor must know the Z of
// the scan line above. It keeps them in an external memory addressed by
// PREV_ADDR, reading the byte pair of a column before overwriting it with the
// current row's pair. This is that memory: DEPTH bytes, a combinational read
// (the data of an address presented during a clock is valid before the end of
// that clock) and a write at the rising edge while wr_strb is high. The
// thesis places the buffer outside the chip and gives its address and strobe
// pins; the memory behaviour here is this design's assumption. Default depth
// is two bytes for each of the 513 columns of the thesis's raster.
module prev_z_ram #(
  parameter int unsigned ROW_PIXELS = 513,
  parameter int unsigned ADDR_W     = 14
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              wr_strb,
  input  logic [7:0]        wdata,
  output logic [7:0]        rdata
);

  localparam int unsigned DEPTH = 2 * ROW_PIXELS;
  localparam int unsigned IDX_W = $clog2(DEPTH);

  logic [7:0]       mem [DEPTH];
  logic [IDX_W-1:0] idx;
  logic             in_range;

  assign idx      = addr[IDX_W-1:0];
  assign in_range = (32'(addr) < DEPTH);

  always_ff @(posedge clk)
    if (wr_strb && in_range)
      mem[idx] <= wdata;

  assign rdata = in_range ? mem[idx] : 8'd0;

endmodule
