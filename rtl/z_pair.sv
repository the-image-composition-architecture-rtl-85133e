// Z circuit: two enabled 8-bit registers in series.
//
// When en is high the first register takes d and the second takes the first,
// so enabling it on the two clocks that carry a pixel's Z low and Z high bytes
// leaves that pixel's Z inside for one pixel time. While the next pixel's
// bytes shift in, the second register presents the previous pixel's Z low and
// then Z high, which gives the Compositor the left-hand corner Z values
// without reading them again. Load on the rising clock edge; synchronous
// reset clears both registers. Structure as described in the thesis.
module z_pair (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic [7:0] d,
  output logic [7:0] q1,  // first register
  output logic [7:0] q2   // second register
);

  always_ff @(posedge clk) begin
    if (rst) begin
      q1 <= '0;
      q2 <= '0;
    end else if (en) begin
      q1 <= d;
      q2 <= q1;
    end
  end

endmodule
