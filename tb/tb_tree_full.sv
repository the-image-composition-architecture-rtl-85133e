// Full-size test of the Compositor tree at its default parameters: eight
// 513 x 513 rasters (a 512 x 512 picture plus its extra row and column of Z)
// composed into one, checked pixel by pixel against the reference model.
module tb_tree_full;
  tree_bench #(.W(513), .H(513)) bench ();
endmodule
