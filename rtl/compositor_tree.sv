// Compositor tree: the image composition architecture.
//
// N graphics processors each render one object into a full raster (Z, alpha
// and premultiplied R, G, B per pixel, transparent black where the object is
// absent) and stream it out in lock-step, pixel by pixel. A binary tree of
// N-1 Compositors merges the streams pairwise: each level halves the number
// of rasters until the root emits the final picture, with anti-aliased hidden
// surfaces, to the frame buffer. Node numbering is heap order: node 1 is the
// root, node i composes node 2i (Front) with node 2i+1 (Back), and nodes
// N..2N-1 are the graphics-processor streams gp_data[0..N-1].
//
// The leaf Compositors fetch their input bytes by IN_ADDR (byte offset within
// the current row) from the processors' output memories, which must return the
// addressed byte within the same clock; all leaves present the same address,
// brought out as gp_addr. A leaf level starts a scan line when start_row is
// high (the next clock is the first byte of the row). Higher levels take their
// inputs straight from the level above and are started by its OUT_START_ROW,
// so each level adds 10 clocks of latency while every level keeps the rate of
// one pixel per six clocks. Each Compositor has its own pair of previous-row Z
// buffers. The root's OUT_DATA, OUT_ADDR and OUT_START_ROW go to the frame
// buffer. The tree shape and the default of eight processors follow the
// thesis's overview figure; its raster is 513 pixels wide, which sizes the
// previous-row buffers. N must be a power of two, at least 2.
module compositor_tree
  import comp_pkg::*;
#(
  parameter int unsigned N_LEAVES   = 8,
  parameter int unsigned ROW_PIXELS = 513
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start_row,
  input  logic [7:0]           gp_data [N_LEAVES],
  output logic [IN_ADDR_W-1:0] gp_addr,
  output logic [7:0]           out_data,
  output logic [IN_ADDR_W-1:0] out_addr,
  output logic                 out_start_row
);

  localparam int unsigned NODES = 2 * N_LEAVES;

  logic [7:0]           node_data  [1:NODES-1];
  logic                 node_start [1:NODES-1];
  logic [IN_ADDR_W-1:0] node_in_addr  [1:N_LEAVES-1];
  logic [IN_ADDR_W-1:0] node_out_addr [1:N_LEAVES-1];

  for (genvar j = 0; j < N_LEAVES; j++) begin : g_leaf
    assign node_data[N_LEAVES + j]  = gp_data[j];
    assign node_start[N_LEAVES + j] = start_row;
  end

  for (genvar i = 1; i < N_LEAVES; i++) begin : g_node
    logic [7:0]             pf_rd, pb_rd, pf_wr, pb_wr;
    logic                   p_oe, p_rd, p_wr;
    logic [PREV_ADDR_W-1:0] p_addr;

    compositor u_comp (
      .clk            (clk),
      .rst            (rst),
      .start_row      (node_start[2*i]),
      .front_data     (node_data[2*i]),
      .back_data      (node_data[2*i+1]),
      .in_addr        (node_in_addr[i]),
      .prev_front_in  (pf_rd),
      .prev_back_in   (pb_rd),
      .prev_front_out (pf_wr),
      .prev_back_out  (pb_wr),
      .prev_oe        (p_oe),
      .prev_addr      (p_addr),
      .prev_rd_strb   (p_rd),
      .prev_wr_strb   (p_wr),
      .out_data       (node_data[i]),
      .out_addr       (node_out_addr[i]),
      .out_start_row  (node_start[i])
    );

    prev_z_ram #(.ROW_PIXELS(ROW_PIXELS), .ADDR_W(PREV_ADDR_W)) u_prev_front (
      .clk     (clk),
      .addr    (p_addr),
      .wr_strb (p_wr & p_oe),
      .wdata   (pf_wr),
      .rdata   (pf_rd)
    );

    prev_z_ram #(.ROW_PIXELS(ROW_PIXELS), .ADDR_W(PREV_ADDR_W)) u_prev_back (
      .clk     (clk),
      .addr    (p_addr),
      .wr_strb (p_wr & p_oe),
      .wdata   (pb_wr),
      .rdata   (pb_rd)
    );
  end

  assign gp_addr       = node_in_addr[N_LEAVES/2];
  assign out_data      = node_data[1];
  assign out_addr      = node_out_addr[1];
  assign out_start_row = node_start[1];

endmodule
