// Compositor: composes two pixel streams into one, six clocks per pixel.
//
// Two rasters, Front and Back, arrive pixel by pixel in lock-step on two 8-bit
// buses, each pixel as six bytes: Z low, Z high, alpha, red, green, blue (Z is
// a 16-bit depth with small = near; colours are premultiplied by alpha). For
// every pixel the chip estimates beta, the fraction of the pixel where Front
// is nearer, from nine Z comparisons over the pixel's four corners, and forms
//   Z     = min(Z_F, Z_B)
//   alpha = alpha_B + alpha_F - alpha_B*alpha_F
//   C     = (1 - alpha_F*beta)*C_B + (1 - alpha_B*(1 - beta))*C_F   (C = R,G,B)
// which is Duff's composition with a cheap coverage estimate. The output is
// a pixel stream of the same format, so Compositors chain into a tree.
//
// Corner Z values: the pixel's own Z is its bottom-right corner. The bottom-
// left corner is the previous pixel's Z, held in a Z circuit; the two top
// corners come from the previous scan line, read from an external buffer
// (PREV_FRONT / PREV_BACK) in cycles 0 and 1 and replaced there by the
// current Z in cycles 2 and 3. The first pixel of a row and the whole first
// row therefore see stale neighbours: like the thesis's 513x513 raster, a
// raster carries one extra row and column that only supply Z.
//
// Schedule (cycle k of one pixel, k = 0 when its Z low is on the input pins):
//   k 0..5   bytes on FRONT_DATA/BACK_DATA, captured one clock later
//   k 1,2    corner compares (low, high); Z circuits shift; Save loads
//   k 2,3    Save writes the current Z to the previous-row buffer
//   k 3      A+ on alpha; k 4 alpha_F + alpha_B
//   k 5      beta valid; loaded into both multipliers (Back: beta x alpha_F,
//            Front: (1-beta) x alpha_B)
//   k 7      Back multiplier loads alpha_B x alpha_F
//   k 8      INC forms the two colour factors, loaded at the end of k 8
//   k 9..11  colour bytes of both streams through the multipliers
//   k 10     second adder: (alpha_F + alpha_B) - alpha_F*alpha_B
//   k 11..13 second adder: C_B*factor_B + C_F*factor_F
//   k 10..15 output bytes on OUT_DATA: Z low, Z high, alpha, R, G, B
// so the pixel latency is 10 clocks and a new pixel enters every 6 clocks.
// This schedule, the circuit list (Input, Previous, Save, four Z circuits plus
// one holding Z-min, BETA, A+, A-, Neg, two multipliers with INC feedback,
// two 9-bit adders, the R,G,B register pipes, the muxes and the output
// register) and the pin list follow the thesis. The colour sums keep their low
// eight bits, which cannot overflow for premultiplied inputs.
//
// Control: the sequencer's six one-hot phases enable every register and
// select every mux. START_ROW high in a clock makes the next clock cycle 0 of
// a row's first pixel; OUT_START_ROW is START_ROW delayed by the 10-clock
// latency, so it can drive the START_ROW of a Compositor one tree level down.
// IN_ADDR and OUT_ADDR count bytes from the start of the current row (for a
// dual-ported memory feeding or receiving the stream); PREV_ADDR is 2*column
// + byte. These address formats are this design's choice. The bidirectional
// previous-row pins are split into an input, an output and an output enable
// (prev_oe, equal to PREV_WR_STRB). Reset is synchronous and active high.
module compositor
  import comp_pkg::*;
(
  input  logic                   clk,           // CLK
  input  logic                   rst,           // RESET
  input  logic                   start_row,     // START_ROW
  input  logic [7:0]             front_data,    // FRONT_DATA
  input  logic [7:0]             back_data,     // BACK_DATA
  output logic [IN_ADDR_W-1:0]   in_addr,       // IN_ADDR
  input  logic [7:0]             prev_front_in, // PREV_FRONT, read
  input  logic [7:0]             prev_back_in,  // PREV_BACK, read
  output logic [7:0]             prev_front_out,// PREV_FRONT, write
  output logic [7:0]             prev_back_out, // PREV_BACK, write
  output logic                   prev_oe,       // drive PREV_FRONT/BACK
  output logic [PREV_ADDR_W-1:0] prev_addr,     // PREV_ADDR
  output logic                   prev_rd_strb,  // PREV_RD_STRB
  output logic                   prev_wr_strb,  // PREV_WR_STRB
  output logic [7:0]             out_data,      // OUT_DATA
  output logic [IN_ADDR_W-1:0]   out_addr,      // OUT_ADDR
  output logic                   out_start_row  // OUT_START_ROW
);

  // ------------------------------------------------------------ sequencing --
  logic [2:0] count;
  logic [5:0] ph;
  logic       pixel_end;

  sequencer u_seq (
    .clk       (clk),
    .rst       (rst),
    .start_row (start_row),
    .count     (count),
    .phase     (ph),
    .pixel_end (pixel_end)
  );

  // ------------------------------------------------------------- addresses --
  logic [PREV_ADDR_W-2:0]   prev_col;
  logic [PIXEL_LATENCY-1:0] start_dly;

  always_ff @(posedge clk) begin
    if (rst || start_row) begin
      in_addr  <= '0;
      prev_col <= '0;
    end else begin
      in_addr <= in_addr + 1'b1;
      if (pixel_end)
        prev_col <= prev_col + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst)
      start_dly <= '0;
    else
      start_dly <= {start_dly[PIXEL_LATENCY-2:0], start_row};
  end

  assign out_start_row = start_dly[PIXEL_LATENCY-1];

  always_ff @(posedge clk) begin
    if (rst || out_start_row)
      out_addr <= '0;
    else
      out_addr <= out_addr + 1'b1;
  end

  assign prev_addr    = {prev_col, ph[1] | ph[3] | ph[4] | ph[5]};
  assign prev_rd_strb = ph[0] | ph[1];
  assign prev_wr_strb = ph[2] | ph[3];
  assign prev_oe      = prev_wr_strb;

  // ----------------------------------------------- Input, Previous, Save ---
  logic [7:0] in_f, in_b;          // Input
  logic [7:0] pv_f, pv_b;          // Previous
  logic [7:0] save_lo_f, save_lo_b, save_hi_f, save_hi_b;  // Save

  always_ff @(posedge clk) begin
    if (rst) begin
      in_f <= '0; in_b <= '0;
      pv_f <= '0; pv_b <= '0;
      save_lo_f <= '0; save_lo_b <= '0;
      save_hi_f <= '0; save_hi_b <= '0;
    end else begin
      in_f <= front_data;
      in_b <= back_data;
      if (ph[0] | ph[1]) begin
        pv_f <= prev_front_in;
        pv_b <= prev_back_in;
      end
      if (ph[1]) begin
        save_lo_f <= in_f;
        save_lo_b <= in_b;
      end
      if (ph[2]) begin
        save_hi_f <= in_f;
        save_hi_b <= in_b;
      end
    end
  end

  assign prev_front_out = ph[2] ? save_lo_f : save_hi_f;
  assign prev_back_out  = ph[2] ? save_lo_b : save_hi_b;

  // ------------------------------------------------------------ Z circuits --
  logic       z_shift;
  logic [7:0] zin_f_q1, zin_f_q2, zin_b_q1, zin_b_q2;
  logic [7:0] zpv_f_q1, zpv_f_q2, zpv_b_q1, zpv_b_q2;

  assign z_shift = ph[1] | ph[2];

  z_pair u_zin_f (.clk, .rst, .en(z_shift), .d(in_f), .q1(zin_f_q1), .q2(zin_f_q2));
  z_pair u_zin_b (.clk, .rst, .en(z_shift), .d(in_b), .q1(zin_b_q1), .q2(zin_b_q2));
  z_pair u_zpv_f (.clk, .rst, .en(z_shift), .d(pv_f), .q1(zpv_f_q1), .q2(zpv_f_q2));
  z_pair u_zpv_b (.clk, .rst, .en(z_shift), .d(pv_b), .q1(zpv_b_q1), .q2(zpv_b_q2));

  // ------------------------------------------------------------------ BETA --
  logic [4:0] beta;
  logic [4:0] neg_beta;
  logic       min_sel;

  beta_unit u_beta (
    .clk     (clk),
    .rst     (rst),
    .phase   (ph),
    .tl_f    (zpv_f_q2), .tl_b (zpv_b_q2),
    .tr_f    (pv_f),     .tr_b (pv_b),
    .br_f    (in_f),     .br_b (in_b),
    .bl_f    (zin_f_q2), .bl_b (zin_b_q2),
    .beta    (beta),
    .min_sel (min_sel)
  );

  one_minus #(.WIDTH(BETA_W)) u_neg (.x(beta), .y(neg_beta));

  // Fifth Z circuit: Z-min, shifted in while the Input Z circuits present the
  // finished pixel's Z (k 7, 8) and shifted once more after Z low leaves (k 9).
  logic [7:0] zmin_q1, zmin_q2;

  z_pair u_zmin (
    .clk (clk),
    .rst (rst),
    .en  (ph[1] | ph[2] | ph[3]),
    .d   (min_sel ? zin_b_q2 : zin_f_q2),
    .q1  (zmin_q1),
    .q2  (zmin_q2)
  );

  // ----------------------------------------------------------- alpha entry --
  logic [8:0] a_f_in, a_b_in;      // A+ outputs
  logic [8:0] alpha_f, alpha_b;    // D9S
  logic [8:0] alpha_sum;           // D9S after the first 9-bit add

  alpha_inc u_ainc_f (.alpha_ext(in_f), .alpha_int(a_f_in));
  alpha_inc u_ainc_b (.alpha_ext(in_b), .alpha_int(a_b_in));

  always_ff @(posedge clk) begin
    if (rst) begin
      alpha_f   <= '0;
      alpha_b   <= '0;
      alpha_sum <= '0;
    end else begin
      if (ph[3]) begin
        alpha_f <= a_f_in;
        alpha_b <= a_b_in;
      end
      if (ph[4])
        alpha_sum <= alpha_f + alpha_b;   // 2.0 wraps to 0.0, corrected later
    end
  end

  // ---------------------------------------------------- R,G,B register pipes --
  logic [7:0] pipe_f [4];
  logic [7:0] pipe_b [4];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 4; i++) begin
        pipe_f[i] <= '0;
        pipe_b[i] <= '0;
      end
    end else begin
      pipe_f[0] <= in_f;
      pipe_b[0] <= in_b;
      for (int i = 1; i < 4; i++) begin
        pipe_f[i] <= pipe_f[i-1];
        pipe_b[i] <= pipe_b[i-1];
      end
    end
  end

  // ----------------------------------------------------------- multipliers --
  logic [8:0] mb_a_ext, mb_b_in, mb_p_small, mb_p_large, mb_a;
  logic [8:0] mf_a_ext, mf_b_in, mf_p_small, mf_p_large, mf_a;
  logic       alpha_phase;

  assign alpha_phase = ph[5] | ph[0] | ph[1];

  // Multiplier BACK: beta*alpha_F (k 5), alpha_B*alpha_F (k 7), C_B*factor_B
  assign mb_a_ext = ph[5] ? {4'd0, beta} : alpha_b;
  assign mb_b_in  = alpha_phase ? alpha_f : {1'b0, pipe_b[3]};

  mult_unit u_mult_back (
    .clk      (clk),
    .rst      (rst),
    .a_ext    (mb_a_ext),
    .a_fb_sel (ph[2]),
    .a_load   (ph[5] | ph[1] | ph[2]),
    .b_in     (mb_b_in),
    .p_small  (mb_p_small),
    .p_large  (mb_p_large),
    .a_reg    (mb_a)
  );

  // Multiplier FRONT: (1-beta)*alpha_B (k 5), C_F*factor_F
  assign mf_a_ext = {4'd0, neg_beta};
  assign mf_b_in  = alpha_phase ? alpha_b : {1'b0, pipe_f[3]};

  mult_unit u_mult_front (
    .clk      (clk),
    .rst      (rst),
    .a_ext    (mf_a_ext),
    .a_fb_sel (ph[2]),
    .a_load   (ph[5] | ph[2]),
    .b_in     (mf_b_in),
    .p_small  (mf_p_small),
    .p_large  (mf_p_large),
    .a_reg    (mf_a)
  );

  // ------------------------------------------------------------ exit adder --
  logic       sub_phase;
  logic [8:0] add_a, add_b, add_sum;
  logic [8:0] exit_d9;
  logic [7:0] alpha_out;

  assign sub_phase = ph[4];
  assign add_a     = sub_phase ? alpha_sum : mf_p_large;
  assign add_b     = sub_phase ? ~mb_p_large : mb_p_large;
  assign add_sum   = add_a + add_b + {8'd0, sub_phase};

  always_ff @(posedge clk) begin
    if (rst)
      exit_d9 <= '0;
    else
      exit_d9 <= add_sum;
  end

  alpha_dec u_adec (.alpha_int(exit_d9), .alpha_ext(alpha_out));

  // ------------------------------------------------------------ output mux --
  always_ff @(posedge clk) begin
    if (rst)
      out_data <= '0;
    else if (ph[3] | ph[4])
      out_data <= zmin_q2;
    else if (ph[5])
      out_data <= alpha_out;
    else
      out_data <= exit_d9[7:0];
  end

endmodule
