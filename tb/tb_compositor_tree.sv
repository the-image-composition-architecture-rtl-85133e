// Small end-to-end test of the Compositor tree at its default parameters
// (eight graphics processors, seven Compositors): a 16 x 10 pixel frame.
module tb_compositor_tree;
  tree_bench #(.W(16), .H(10)) bench ();
endmodule
