// Beta adder: sums the nine weight bits of the 3x3 Bartlett estimate.
//
// Each comparison contributes a weight when Front is nearer or level with
// Back: 1/16 for each of the four corners, 1/8 for each of the four edges and
// 1/4 for the centre, so beta = (corners + 2*edges + 4*centre) sixteenths,
// 0..16. The inputs are the comparators' sign bits, which are the weights in
// negative logic (sign 0 = weight present). As in the thesis the sum is split
// into partial sums X (corners and centre) and Y (edges) which are then added.
// Purely combinational.
module beta_adder (
  input  logic [3:0] corner_sign,  // {TL, TR, BR, BL}
  input  logic [3:0] edge_sign,    // {T, R, B, L}
  input  logic       centre_sign,
  output logic [4:0] beta          // sixteenths, 16 = 1.0
);

  logic [3:0] x_sum;  // sixteenths, 0..8
  logic [3:0] y_sum;  // sixteenths, 0..8

  always_comb begin
    x_sum = {1'b0, ~centre_sign, 2'b00};
    y_sum = '0;
    for (int i = 0; i < 4; i++) begin
      x_sum = x_sum + {3'b000, ~corner_sign[i]};
      y_sum = y_sum + {2'b00, ~edge_sign[i], 1'b0};
    end
    beta = {1'b0, x_sum} + {1'b0, y_sum};
  end

endmodule
