// A-: converts a 9-bit internal alpha back to the 8-bit external form.
//
// The inverse of A+: when bit 8 or bit 7 is set the value is decremented by
// one, so 256 (1.0) leaves the chip as 255 and values below 128 pass
// unchanged. As in the thesis the borrow into a chain of half subtractors is
// the OR of the two top bits. Purely combinational.
module alpha_dec (
  input  logic [8:0] alpha_int,  // 256 = 1.0
  output logic [7:0] alpha_ext   // 255 = 1.0
);

  logic [8:0] borrow;

  assign borrow[0] = alpha_int[8] | alpha_int[7];

  for (genvar i = 0; i < 8; i++) begin : g_half_sub
    assign alpha_ext[i] = alpha_int[i] ^ borrow[i];
    assign borrow[i+1]  = ~alpha_int[i] & borrow[i];
  end

endmodule
