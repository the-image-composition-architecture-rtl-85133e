// 1.0 - x for an unsigned fixed-point fraction whose 1.0 is the top bit.
//
// With WIDTH = 9 this is the INC circuit of the multiplier feedback path,
// forming 1.0 - alpha*beta (1.0 = 256); with WIDTH = 5 it is the Neg circuit
// that forms 1.0 - beta (1.0 = 16). As the thesis derives, the result is a
// two's-complement negation with the top bit flipped back: invert the low
// bits, keep the top bit inverted twice, add one. Inputs above 1.0 are not
// expected. Purely combinational.
module one_minus #(
  parameter int unsigned WIDTH = 9
) (
  input  logic [WIDTH-1:0] x,  // 0 .. 2**(WIDTH-1)
  output logic [WIDTH-1:0] y   // 2**(WIDTH-1) - x
);

  assign y = (x ^ {1'b0, {(WIDTH-1){1'b1}}}) + WIDTH'(1);

endmodule
