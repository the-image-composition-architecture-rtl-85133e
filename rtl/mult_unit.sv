// Multiplier with its feedback circuit (one of the two Compositor multipliers).
//
// Operand A comes from a holding register (D9S) fed by a mux that chooses
// either the external A value (beta, 1.0 - beta or an alpha) or the feedback
// value 1.0 - (A*B >> 4) produced by the INC circuit from the previous small
// product. Operand B comes from a plain register (D9) that loads b_in every
// clock. The core multiplier's 18-bit product is captured every clock in two
// output registers: p_small = product >> 4 (the 5x9 product beta*alpha, beta
// in sixteenths) which feeds INC, and p_large = product >> 8 (the 9x9 and 8x9
// products, alpha*alpha and colour*factor) which leaves the circuit.
//
// Timing: with a_load high at the end of cycle c-1 (and b_in valid then), the
// operands are in the registers during cycle c and both products are valid in
// the output registers during cycle c+2. Holding A with a_load low lets a
// factor multiply three colour bytes streamed through B. The structure (mux,
// D9S, D9, core, two output registers, INC in the feedback) follows the
// thesis; the equal two-stage latency for both product types follows its
// pixel timing table.
module mult_unit (
  input  logic       clk,
  input  logic       rst,
  input  logic [8:0] a_ext,      // external A operand
  input  logic       a_fb_sel,   // 1: load A from INC feedback
  input  logic       a_load,     // D9S load enable
  input  logic [8:0] b_in,       // B operand, registered every clock
  output logic [8:0] p_small,    // (A*B) >> 4, registered
  output logic [8:0] p_large,    // (A*B) >> 8, registered
  output logic [8:0] a_reg       // current A operand
);

  logic [8:0]  b_reg;
  logic [8:0]  inc_out;
  logic [17:0] prod;

  one_minus #(.WIDTH(9)) u_inc (
    .x (p_small),
    .y (inc_out)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      a_reg <= '0;
      b_reg <= '0;
    end else begin
      if (a_load)
        a_reg <= a_fb_sel ? inc_out : a_ext;
      b_reg <= b_in;
    end
  end

  mult_core u_core (
    .clk (clk),
    .rst (rst),
    .a   (a_reg),
    .b   (b_reg),
    .p   (prod)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      p_small <= '0;
      p_large <= '0;
    end else begin
      p_small <= prod[12:4];
      p_large <= prod[16:8];
    end
  end

endmodule
