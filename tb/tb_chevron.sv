// Chevron test: one Compositor composes a flat white square with a blue
// square whose depth is corrugated, for eleven chevron slopes.
//
// Front is white (R = G = B = 250, alpha = 1.0) at a constant Z of 10000.
// Back is blue (R = 0, G = 80, B = 120, alpha = 1.0) whose Z is a triangle
// wave across lines of slope s in the X-Y plane: positive slope in the upper
// half of the square and its mirror image in the lower half, so the two
// surfaces intersect along chevrons. The slopes are 7.0671, 10/3, 1, 1/1.1,
// 2/3, 1/3, 1/5, 1/8, 1/8.1, 1/12 and 1/15, from very steep to nearly flat.
// The square is 64 x 64 pixels plus one leading row and column that only
// supply corner depths, so the raster is 65 x 65.
//
// Every output pixel is compared with the bit-exact arithmetic model (Z for
// all pixels, alpha and colour for the 64 x 64 interior). Each slope must
// produce pixels that are all white, all blue and mixed. For information the
// bench also prints, per slope, the standard deviation of the non-zero colour
// differences between the hardware result and an ideal blend whose coverage
// is measured by 16 x 16 supersampling of the exact depth functions, the
// quality measure used to choose the nine-sample coverage estimate.
//
// The slopes, colours and depth of the white square follow the thesis's test
// images; the wave's period (16 pixels) and amplitude (300 per pixel) are
// this bench's own choice, since the exact corrugation is not specified.
module tb_chevron;
  import comp_pkg::*;
  import comp_ref_pkg::*;

  localparam int W = 65;
  localparam int H = 65;
  localparam int NSLOPE = 11;
  localparam real PERIOD = 16.0;
  localparam real AMP = 300.0;

  logic clk = 1'b0, rst = 1'b1, start_row = 1'b0;
  logic [7:0] front_data, back_data, pf_rd, pb_rd, pf_wr, pb_wr, out_data;
  logic [IN_ADDR_W-1:0] in_addr, out_addr;
  logic [PREV_ADDR_W-1:0] prev_addr;
  logic prev_oe, prev_rd_strb, prev_wr_strb, out_start_row;

  always #5 clk = ~clk;

  compositor dut (
    .clk, .rst, .start_row, .front_data, .back_data, .in_addr,
    .prev_front_in (pf_rd), .prev_back_in (pb_rd),
    .prev_front_out(pf_wr), .prev_back_out(pb_wr),
    .prev_oe, .prev_addr, .prev_rd_strb, .prev_wr_strb,
    .out_data, .out_addr, .out_start_row
  );

  prev_z_ram u_pf (.clk, .addr(prev_addr), .wr_strb(prev_wr_strb & prev_oe), .wdata(pf_wr), .rdata(pf_rd));
  prev_z_ram u_pb (.clk, .addr(prev_addr), .wr_strb(prev_wr_strb & prev_oe), .wdata(pb_wr), .rdata(pb_rd));

  rpix_t fr [W*H];
  rpix_t bk [W*H];
  rpix_t ex [W*H];
  real   ideal_beta [W*H];
  mech_t mech;
  int checks = 0, failures = 0;
  int feed_row, out_row;
  logic [47:0] cap;
  real slope;
  real sum_d, sum_d2;
  int  n_d, got_white, got_blue, got_mixed;

  // Depth of the blue surface at a real position (x, y).
  function automatic real blue_z(real x, real y, real s);
    real ym, u, t;
    ym = (y < 32.5) ? y : 65.0 - y;
    u  = ym - s * x;
    t  = u - PERIOD * $floor(u / PERIOD);
    return 10000.0 + AMP * ((t > PERIOD / 2 ? PERIOD - t : t) - PERIOD / 4);
  endfunction

  always_comb begin
    if (feed_row >= 0 && feed_row < H && int'(in_addr) < 6 * W) begin
      front_data = pix_byte(fr[feed_row * W + int'(in_addr) / 6], int'(in_addr) % 6);
      back_data  = pix_byte(bk[feed_row * W + int'(in_addr) / 6], int'(in_addr) % 6);
    end else begin
      front_data = 8'd0;
      back_data  = 8'd0;
    end
  end

  always_ff @(posedge clk)
    if (rst) feed_row <= -1;
    else if (start_row) feed_row <= feed_row + 1;

  always_ff @(posedge clk) begin
    if (rst) out_row <= -1;
    else begin
      if (out_start_row) out_row <= out_row + 1;
      if (out_row >= 0 && out_row < H && int'(out_addr) < 6 * W) begin
        automatic int c = int'(out_addr) / 6;
        automatic int k = int'(out_addr) % 6;
        automatic logic [47:0] word = cap;
        word[8*k +: 8] = out_data;
        cap <= word;
        if (k == 5) begin
          automatic int i = out_row * W + c;
          automatic rpix_t e = ex[i];
          checks++;
          if (word[15:0] != e.z) begin
            failures++;
            $display("slope %f Z row %0d col %0d: got %0d expected %0d", slope, out_row, c, word[15:0], e.z);
          end
          if (out_row > 0 && c > 0) begin
            automatic real ib = ideal_beta[i];
            automatic real d;
            checks++;
            if (word[47:16] != {e.b, e.g, e.r, e.a}) begin
              failures++;
              $display("slope %f row %0d col %0d: got a=%0d r=%0d g=%0d b=%0d expected a=%0d r=%0d g=%0d b=%0d",
                       slope, out_row, c, word[23:16], word[31:24], word[39:32], word[47:40],
                       e.a, e.r, e.g, e.b);
            end
            if (word[47:24] == {8'd250, 8'd250, 8'd250}) got_white++;
            else if (word[47:24] == {8'd120, 8'd80, 8'd0}) got_blue++;
            else got_mixed++;
            // ideal blend: beta * white + (1 - beta) * blue, per channel
            d = real'(word[31:24]) - (ib * 250.0);
            if (d > 0.5 || d < -0.5) begin sum_d += d < 0 ? -d : d; sum_d2 += d * d; n_d++; end
            d = real'(word[39:32]) - (ib * 250.0 + (1.0 - ib) * 80.0);
            if (d > 0.5 || d < -0.5) begin sum_d += d < 0 ? -d : d; sum_d2 += d * d; n_d++; end
            d = real'(word[47:40]) - (ib * 250.0 + (1.0 - ib) * 120.0);
            if (d > 0.5 || d < -0.5) begin sum_d += d < 0 ? -d : d; sum_d2 += d * d; n_d++; end
          end
        end
      end
    end
  end

  task automatic build(real s);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        automatic int z = int'(blue_z(real'(x), real'(y), s));
        fr[y*W + x] = '{z: 16'd10000, a: 8'd255, r: 8'd250, g: 8'd250, b: 8'd250};
        bk[y*W + x] = '{z: 16'(z), a: 8'd255, r: 8'd0, g: 8'd80, b: 8'd120};
      end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        automatic int zf[4], zb[4];
        automatic int n_cov = 0;
        if (x == 0 || y == 0) begin
          ex[y*W + x] = compose(fr[y*W + x], bk[y*W + x], 16, mech);
          ideal_beta[y*W + x] = 1.0;
        end else begin
          zf[0] = fr[(y-1)*W + x-1].z; zb[0] = bk[(y-1)*W + x-1].z;
          zf[1] = fr[(y-1)*W + x].z;   zb[1] = bk[(y-1)*W + x].z;
          zf[2] = fr[y*W + x].z;       zb[2] = bk[y*W + x].z;
          zf[3] = fr[y*W + x-1].z;     zb[3] = bk[y*W + x-1].z;
          ex[y*W + x] = compose(fr[y*W + x], bk[y*W + x], beta16(zf, zb), mech);
          // the pixel spans (x-1, y-1) .. (x, y); Front wins where blue is farther
          for (int j = 0; j < 16; j++)
            for (int i = 0; i < 16; i++)
              if (blue_z(real'(x - 1) + (real'(i) + 0.5) / 16.0,
                         real'(y - 1) + (real'(j) + 0.5) / 16.0, s) >= 10000.0)
                n_cov++;
          ideal_beta[y*W + x] = real'(n_cov) / 256.0;
        end
      end
  endtask

  initial begin
    real slopes [NSLOPE];
    slopes = '{7.0671, 10.0 / 3.0, 1.0, 1.0 / 1.1, 2.0 / 3.0, 1.0 / 3.0,
               0.2, 0.125, 1.0 / 8.1, 1.0 / 12.0, 1.0 / 15.0};
    mech = '{default: 0};
    for (int n = 0; n < NSLOPE; n++) begin
      slope = slopes[n];
      build(slope);
      sum_d = 0.0; sum_d2 = 0.0; n_d = 0;
      got_white = 0; got_blue = 0; got_mixed = 0;
      rst <= 1'b1;
      repeat (3) @(posedge clk);
      rst <= 1'b0;
      @(posedge clk);
      for (int r = 0; r < H; r++) begin
        start_row <= 1'b1;
        @(posedge clk);
        start_row <= 1'b0;
        repeat (6 * W - 1) @(posedge clk);
      end
      repeat (6 * W + 20) @(posedge clk);
      checks++;
      if (out_row != H - 1) begin failures++; $display("only %0d rows out", out_row + 1); end
      checks++;
      if (got_white == 0 || got_blue == 0 || got_mixed == 0) begin
        failures++;
        $display("slope %f: white %0d blue %0d mixed %0d", slope, got_white, got_blue, got_mixed);
      end
      if (n_d > 0)
        $display("slope %8.5f: white %4d blue %4d mixed %4d  vs ideal coverage: %0d differing samples, std dev %6.2f",
                 slope, got_white, got_blue, got_mixed, n_d,
                 $sqrt(sum_d2 / n_d - (sum_d / n_d) * (sum_d / n_d)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * NSLOPE * (6 * W * (H + 2) + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
