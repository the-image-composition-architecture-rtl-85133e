// Core multiplier with bypass: a two-stage pipelined unsigned multiplier.
//
// Both operands are 9 bits. Every value the Compositor multiplies is either an
// integer colour below 256 or a fraction no larger than 1.0, and 1.0 is the
// only such fraction with bit 8 set (alpha and the factors use 256 for 1.0).
// The array therefore multiplies only the low 8 bits of each operand, and an
// operand with bit 8 set bypasses the array: the product is then the other
// operand shifted left by eight. Operands above 256 are not expected.
//
// Stage 1 adds the partial products of b[3:0] and registers the partial sum
// together with the operands' remaining bits and the bypass flags; stage 2
// adds the partial products of b[7:4] and resolves the bypass. The product is
// combinational from the stage register: operands applied in cycle c give the
// product during cycle c+1, ready for a register at the end of c+1.
// The thesis builds this as a carry-save array with a pipeline register after
// every two adder stages and describes it in an appendix that is not part of
// this design's source; the split into two stages here is this design's own.
module mult_core (
  input  logic        clk,
  input  logic        rst,
  input  logic [8:0]  a,
  input  logic [8:0]  b,
  output logic [17:0] p     // a * b
);

  logic [15:0] pp_lo;       // sum of a[7:0] * b[3:0]
  logic [15:0] s1_sum;
  logic [7:0]  s1_a;
  logic [3:0]  s1_b_hi;
  logic        s1_byp_a, s1_byp_b;
  logic [8:0]  s1_a_full, s1_b_full;

  always_comb begin
    pp_lo = '0;
    for (int i = 0; i < 4; i++)
      if (b[i]) pp_lo = pp_lo + ({8'd0, a[7:0]} << i);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_sum    <= '0;
      s1_a      <= '0;
      s1_b_hi   <= '0;
      s1_byp_a  <= 1'b0;
      s1_byp_b  <= 1'b0;
      s1_a_full <= '0;
      s1_b_full <= '0;
    end else begin
      s1_sum    <= pp_lo;
      s1_a      <= a[7:0];
      s1_b_hi   <= b[7:4];
      s1_byp_a  <= a[8];
      s1_byp_b  <= b[8];
      s1_a_full <= a;
      s1_b_full <= b;
    end
  end

  logic [15:0] array_p;

  always_comb begin
    array_p = s1_sum;
    for (int i = 0; i < 4; i++)
      if (s1_b_hi[i]) array_p = array_p + ({8'd0, s1_a} << (i + 4));
    if (s1_byp_a)
      p = {1'b0, s1_b_full, 8'd0};
    else if (s1_byp_b)
      p = {1'b0, s1_a_full, 8'd0};
    else
      p = {2'b00, array_p};
  end

endmodule
