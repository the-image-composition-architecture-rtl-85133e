// Test of one Compositor composing two 12 x 8 test rasters.
//
// The two input memories return the byte addressed by IN_ADDR within the
// clock; two previous-row buffers hang on PREV_ADDR. Rows are started back to
// back every 72 clocks. Every output pixel's Z, and the alpha and colours of
// all but the first row and column, are compared with the arithmetic
// reference. The bench also checks the 10-clock latency (OUT_START_ROW and the
// first output byte), the six-clock pixel period (the previous-row strobes
// repeat every six clocks, reads in cycles 0-1 and writes in cycles 2-3) and
// that IN_ADDR restarts at 0 after START_ROW.
module tb_compositor;
  import comp_pkg::*;
  import comp_ref_pkg::*;

  localparam int W = 12;
  localparam int H = 8;

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
  mech_t mech;
  int checks = 0, failures = 0;
  int feed_row, out_row;
  longint cyc = 0, last_start = 0;
  logic [47:0] cap;
  logic start_d;

  always_comb begin
    if (feed_row >= 0 && feed_row < H && int'(in_addr) < 6 * W) begin
      front_data = pix_byte(fr[feed_row * W + int'(in_addr) / 6], int'(in_addr) % 6);
      back_data  = pix_byte(bk[feed_row * W + int'(in_addr) / 6], int'(in_addr) % 6);
    end else begin
      front_data = 8'd0;
      back_data  = 8'd0;
    end
  end

  always_ff @(posedge clk) begin
    cyc     <= cyc + 1;
    start_d <= start_row;
    if (rst) feed_row <= -1;
    else if (start_row) begin
      feed_row   <= feed_row + 1;
      last_start <= cyc;
    end
    if (!rst && start_d) begin
      checks++;
      if (in_addr != 0) begin failures++; $display("IN_ADDR not restarted"); end
    end
    // strobes follow the six-clock cycle: reads at in_addr%6 0,1, writes at 2,3
    if (!rst && feed_row >= 0) begin
      automatic int k = int'(in_addr) % 6;
      checks++;
      if (prev_rd_strb != (k < 2) || prev_wr_strb != (k == 2 || k == 3)) begin
        failures++;
        $display("strobe pattern wrong at byte %0d", k);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) out_row <= -1;
    else begin
      if (out_start_row) begin
        out_row <= out_row + 1;
        checks++;
        if (cyc - last_start != PIXEL_LATENCY) begin
          failures++;
          $display("OUT_START_ROW %0d clocks after START_ROW", cyc - last_start);
        end
      end
      if (out_row >= 0 && out_row < H && int'(out_addr) < 6 * W) begin
        automatic int c = int'(out_addr) / 6;
        automatic int k = int'(out_addr) % 6;
        automatic logic [47:0] word = cap;
        word[8*k +: 8] = out_data;
        cap <= word;
        if (k == 5) begin
          automatic rpix_t e = ex[out_row * W + c];
          checks++;
          if (word[15:0] != e.z) begin
            failures++;
            $display("Z row %0d col %0d: got %0d expected %0d", out_row, c, word[15:0], e.z);
          end
          if (out_row > 0 && c > 0) begin
            checks++;
            if (word[47:16] != {e.b, e.g, e.r, e.a}) begin
              failures++;
              $display("pixel row %0d col %0d: got a=%0d r=%0d g=%0d b=%0d expected a=%0d r=%0d g=%0d b=%0d",
                       out_row, c, word[23:16], word[31:24], word[39:32], word[47:40],
                       e.a, e.r, e.g, e.b);
            end
          end
        end
      end
    end
  end

  initial begin
    mech = '{default: 0};
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        fr[y*W + x] = gen_pixel(3, x, y, W, H);
        bk[y*W + x] = gen_pixel(6, x, y, W, H);
      end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        automatic int zf[4], zb[4];
        if (x == 0 || y == 0) ex[y*W + x] = compose(fr[y*W + x], bk[y*W + x], 16, mech);
        else begin
          zf[0] = fr[(y-1)*W + x-1].z; zb[0] = bk[(y-1)*W + x-1].z;
          zf[1] = fr[(y-1)*W + x].z;   zb[1] = bk[(y-1)*W + x].z;
          zf[2] = fr[y*W + x].z;       zb[2] = bk[y*W + x].z;
          zf[3] = fr[y*W + x-1].z;     zb[3] = bk[y*W + x-1].z;
          ex[y*W + x] = compose(fr[y*W + x], bk[y*W + x], beta16(zf, zb), mech);
        end
      end
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
    $display("confused %0d, all-front %0d, all-back %0d", mech.confused, mech.all_front, mech.all_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * (6 * W * (H + 2) + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
