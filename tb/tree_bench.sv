// End-to-end bench for the Compositor tree, shared by the small and the
// full-size tree testbenches.
//
// Eight graphics-processor output memories are modelled as test rasters of
// W x H pixels that return the byte addressed by the leaves within the clock.
// Rows are started back to back, one every 6*W clocks, the way the leaves must
// be paced. The root's output is captured through OUT_START_ROW and OUT_ADDR
// and compared with an arithmetic reference composed level by level. Z is
// checked everywhere; alpha and colour are checked except in the first row
// and column, whose upper and left neighbours do not exist. The bench also
// checks the 30-clock latency of three tree levels, counts how often each
// composition mechanism occurred (a count of zero is a failure) and stops
// with a failure if the run exceeds its clock budget.
module tree_bench #(
  parameter int W = 16,
  parameter int H = 10
);
  import comp_pkg::*;
  import comp_ref_pkg::*;

  localparam int N      = 8;    // leaves of the default tree
  localparam int LEVELS = 3;
  localparam int NPIX   = W * H;
  localparam longint BUDGET = longint'(6) * W * (H + 2) + 200;

  logic                 clk = 1'b0;
  logic                 rst = 1'b1;
  logic                 start_row = 1'b0;
  logic [7:0]           gp_data [N];
  logic [IN_ADDR_W-1:0] gp_addr;
  logic [7:0]           out_data;
  logic [IN_ADDR_W-1:0] out_addr;
  logic                 out_start_row;

  always #5 clk = ~clk;

  compositor_tree dut (
    .clk, .rst, .start_row, .gp_data, .gp_addr, .out_data, .out_addr,
    .out_start_row
  );

  rpix_t  frm [1:2*N-1][NPIX];
  mech_t  mech;
  int     checks = 0;
  int     failures = 0;
  int     feed_row;
  int     out_row;
  longint cyc = 0;
  longint start_cyc [$];
  int     latency_ok = 0;
  int     rows_out = 0;
  logic [47:0] cap;

  // graphics-processor output memories
  always_comb begin
    for (int j = 0; j < N; j++) begin
      if (feed_row >= 0 && feed_row < H && int'(gp_addr) < 6 * W)
        gp_data[j] = pix_byte(frm[N + j][feed_row * W + int'(gp_addr) / 6],
                              int'(gp_addr) % 6);
      else
        gp_data[j] = 8'd0;
    end
  end

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst)
      feed_row <= -1;
    else if (start_row) begin
      feed_row <= feed_row + 1;
      start_cyc.push_back(cyc);
    end
  end

  // capture and compare the root's output
  always_ff @(posedge clk) begin
    if (rst) begin
      out_row <= -1;
    end else begin
      if (out_start_row) begin
        longint s;
        out_row  <= out_row + 1;
        rows_out <= rows_out + 1;
        s = start_cyc.pop_front();
        checks++;
        if (cyc - s != LEVELS * PIXEL_LATENCY) begin
          failures++;
          $display("latency: row start at %0d, root row start at %0d", s, cyc);
        end else
          latency_ok++;
      end
      if (out_row >= 0 && out_row < H && int'(out_addr) < 6 * W) begin
        automatic int c = int'(out_addr) / 6;
        automatic int k = int'(out_addr) % 6;
        automatic logic [47:0] word = cap;
        word[8*k +: 8] = out_data;
        cap <= word;
        if (k == 5) begin
          automatic rpix_t e = frm[1][out_row * W + c];
          automatic rpix_t g;
          g.z = word[15:0]; g.a = word[23:16]; g.r = word[31:24];
          g.g = word[39:32]; g.b = word[47:40];
          checks++;
          if (g.z != e.z) begin
            failures++;
            if (failures < 10)
              $display("Z mismatch row %0d col %0d: got %0d expected %0d", out_row, c, g.z, e.z);
          end
          if (out_row > 0 && c > 0) begin
            checks++;
            if (g.a != e.a || g.r != e.r || g.g != e.g || g.b != e.b) begin
              failures++;
              if (failures < 10)
                $display("colour mismatch row %0d col %0d: got %h expected %h", out_row, c,
                         {g.a, g.r, g.g, g.b}, {e.a, e.r, e.g, e.b});
            end
          end
        end
      end
    end
  end

  task automatic build_reference();
    mech = '{default: 0};
    for (int j = 0; j < N; j++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          frm[N + j][y * W + x] = gen_pixel(j + 1, x, y, W, H);
    for (int n = N - 1; n >= 1; n--)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          automatic rpix_t f = frm[2 * n][y * W + x];
          automatic rpix_t b = frm[2 * n + 1][y * W + x];
          automatic int zf[4], zb[4];
          automatic int bt;
          if (x == 0 || y == 0) begin
            automatic mech_t dummy;
            frm[n][y * W + x] = compose(f, b, 16, dummy);
          end else begin
            zf[0] = frm[2*n][(y-1)*W + x-1].z;   zb[0] = frm[2*n+1][(y-1)*W + x-1].z;
            zf[1] = frm[2*n][(y-1)*W + x].z;     zb[1] = frm[2*n+1][(y-1)*W + x].z;
            zf[2] = f.z;                         zb[2] = b.z;
            zf[3] = frm[2*n][y*W + x-1].z;       zb[3] = frm[2*n+1][y*W + x-1].z;
            for (int i = 0; i < 4; i++)
              if (zb[i] - zf[i] > 32767 || zf[i] - zb[i] > 32768) mech.big_z_diff++;
            bt = beta16(zf, zb);
            frm[n][y * W + x] = compose(f, b, bt, mech);
          end
        end
  endtask

  task automatic require(string what, int count);
    checks++;
    $display("  %-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    build_reference();
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int r = 0; r < H; r++) begin
      start_row <= 1'b1;
      @(posedge clk);
      start_row <= 1'b0;
      repeat (6 * W - 1) @(posedge clk);
    end
    repeat (6 * W + 6 * LEVELS * PIXEL_LATENCY) @(posedge clk);
    checks++;
    if (rows_out != H) begin
      failures++;
      $display("root emitted %0d rows, expected %0d", rows_out, H);
    end
    $display("mechanisms exercised (all tree nodes, interior pixels):");
    require("confused pixels", mech.confused);
    require("all-Front pixels", mech.all_front);
    require("all-Back pixels", mech.all_back);
    require("Z-min from Back", mech.min_back);
    require("Z-min from Front", mech.min_front);
    require("alpha sum 2.0 wrap", mech.alpha_wrap);
    require("operand 1.0 bypass", mech.one_bypass);
    require("alpha augment (A+)", mech.alpha_augment);
    require("Z difference > 16 bits", mech.big_z_diff);
    require("row restarts at root", rows_out);
    require("level latency checks", latency_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * BUDGET);
    failures++;
    $display("watchdog: run exceeded %0d clocks", BUDGET);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
