// BETA: byte-serial estimate of the Front coverage beta and the Z-min select.
//
// For the pixel whose corners are TL, TR, BR and BL, four corner subtractors
// form Back - Front at each corner, four edge adders sum neighbouring corner
// differences (T = TL+TR, R = TR+BR, B = BR+BL, L = BL+TL) and a centre adder
// sums the R and L edges, i.e. all four corners. The sign bit of every
// result is a comparison: sign 0 means Front is nearer (or level) there, and
// the beta adder turns the nine signs into beta with the weights 1/16 (corner),
// 1/8 (edge), 1/4 (centre). This is the thesis's chosen approximation of Duff's
// coverage: a 3x3 Bartlett filter over the comparisons.
//
// Z arrives low byte first. Each stage works one byte per clock and keeps a
// carry flip-flop: after the low byte it holds the carry into the high byte,
// after the high byte the sign. Results widen so nothing overflows: corner 17
// bits, edge 18 bits, centre sign only. Stages are one clock apart, so with the
// low bytes on the corner inputs in cycle 1 and the high bytes in cycle 2, the
// corner signs are ready in cycle 3, the edge signs in cycle 4 and the centre
// sign in cycle 5; corner signs pass two more flip-flops and edge signs one so
// all nine meet at the beta adder, and beta is valid during cycle 5.
// min_sel (1 = Back is nearer at BR, the pixel's own Z) is captured from the
// BR corner at the end of cycle 3 and holds until the end of the next cycle 3.
// Stages, widths, the pipeline spacing and the Z-min source follow the
// thesis; which edges feed the centre adder is taken from its beta circuit
// figure. Every register except min_sel loads every clock.
module beta_unit (
  input  logic       clk,
  input  logic       rst,
  input  logic [5:0] phase,          // sequencer one-hot
  // corner Z bytes, low byte in cycle 1, high byte in cycle 2
  input  logic [7:0] tl_f, tl_b,     // Z(x-1,y-1)
  input  logic [7:0] tr_f, tr_b,     // Z(x,y-1)
  input  logic [7:0] br_f, br_b,     // Z(x,y)
  input  logic [7:0] bl_f, bl_b,     // Z(x-1,y)
  output logic [4:0] beta,           // valid in cycle 5, sixteenths
  output logic       min_sel         // 1: Back nearer at BR
);

  localparam int TL = 3, TR = 2, BR = 1, BL = 0;
  localparam int ET = 3, ER = 2, EB = 1, EL = 0;

  logic       corner_lo, edge_lo, centre_lo;
  logic [7:0] zf [4];
  logic [7:0] zb [4];

  assign corner_lo = phase[1];
  assign edge_lo   = phase[2];
  assign centre_lo = phase[3];

  always_comb begin
    zf[TL] = tl_f; zb[TL] = tl_b;
    zf[TR] = tr_f; zb[TR] = tr_b;
    zf[BR] = br_f; zb[BR] = br_b;
    zf[BL] = bl_f; zb[BL] = bl_b;
  end

  // ---------------- corner subtractors: Back - Front, 17-bit result ----------
  logic [8:0] corner_res [4];   // low byte, then {sign, high byte}
  logic [3:0] corner_c;         // carry, then sign
  logic [8:0] corner_sum [4];
  logic [3:0] corner_next_c;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      if (corner_lo) begin
        corner_sum[i]    = {1'b0, zb[i]} + {1'b0, ~zf[i]} + 9'd1;
        corner_next_c[i] = corner_sum[i][8];
      end else begin
        corner_sum[i]    = {1'b0, zb[i]} + {1'b0, ~zf[i]} + {8'd0, corner_c[i]};
        corner_next_c[i] = ~corner_sum[i][8];          // bit 16 = sign
        corner_sum[i][8] = ~corner_sum[i][8];
      end
    end
  end

  // ---------------- edge adders: sum of two corners, 18-bit result -----------
  logic [9:0] edge_res [4];     // low byte, then bits 17..8
  logic [3:0] edge_c;
  logic [9:0] edge_sum [4];
  logic [3:0] edge_next_c;
  logic [8:0] edge_a [4];
  logic [8:0] edge_b [4];

  always_comb begin
    edge_a[ET] = corner_res[TL]; edge_b[ET] = corner_res[TR];
    edge_a[ER] = corner_res[TR]; edge_b[ER] = corner_res[BR];
    edge_a[EB] = corner_res[BR]; edge_b[EB] = corner_res[BL];
    edge_a[EL] = corner_res[BL]; edge_b[EL] = corner_res[TL];
    for (int i = 0; i < 4; i++) begin
      if (edge_lo) begin
        edge_sum[i]    = {2'b00, edge_a[i][7:0]} + {2'b00, edge_b[i][7:0]};
        edge_next_c[i] = edge_sum[i][8];
      end else begin
        edge_sum[i]    = {edge_a[i][8], edge_a[i]} + {edge_b[i][8], edge_b[i]}
                         + {9'd0, edge_c[i]};
        edge_next_c[i] = edge_sum[i][9];
      end
    end
  end

  // ---------------- centre adder: R edge + L edge, sign only -----------------
  logic       centre_c;
  logic [10:0] centre_sum;
  logic       centre_next_c;

  always_comb begin
    if (centre_lo) begin
      centre_sum    = {3'b000, edge_res[ER][7:0]} + {3'b000, edge_res[EL][7:0]};
      centre_next_c = centre_sum[8];
    end else begin
      centre_sum    = {edge_res[ER][9], edge_res[ER]} + {edge_res[EL][9], edge_res[EL]}
                      + {10'd0, centre_c};
      centre_next_c = centre_sum[10];
    end
  end

  // ---------------- pipeline registers ----------------------------------------
  logic [3:0] corner_sign_d;    // corner signs, one clock later
  logic [7:0] sign_reg;         // {corner signs, edge signs} at the beta adder

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 4; i++) begin
        corner_res[i] <= '0;
        edge_res[i]   <= '0;
      end
      corner_c      <= '0;
      edge_c        <= '0;
      centre_c      <= 1'b0;
      corner_sign_d <= '0;
      sign_reg      <= '0;
      min_sel       <= 1'b0;
    end else begin
      for (int i = 0; i < 4; i++) begin
        corner_res[i] <= corner_sum[i];
        edge_res[i]   <= edge_sum[i];
      end
      corner_c      <= corner_next_c;
      edge_c        <= edge_next_c;
      centre_c      <= centre_next_c;
      corner_sign_d <= corner_c;
      sign_reg      <= {corner_sign_d, edge_c};
      if (phase[3])
        min_sel <= corner_c[BR];
    end
  end

  beta_adder u_adder (
    .corner_sign (sign_reg[7:4]),
    .edge_sign   (sign_reg[3:0]),
    .centre_sign (centre_c),
    .beta        (beta)
  );

endmodule
