// A+: converts an incoming 8-bit alpha to the 9-bit internal form.
//
// Outside the chip 1.0 is 255; inside it is 256, so that multiplying by 1.0
// is exact. Every value with its top bit set (0.5 and above) is incremented by
// one, which maps 255 to 256 and leaves 0..127 unchanged. As in the thesis,
// the top input bit is the carry into a chain of eight half adders.
// Purely combinational.
module alpha_inc (
  input  logic [7:0] alpha_ext,  // 255 = 1.0
  output logic [8:0] alpha_int   // 256 = 1.0
);

  logic [8:0] carry;

  assign carry[0] = alpha_ext[7];

  for (genvar i = 0; i < 8; i++) begin : g_half_add
    assign alpha_int[i] = alpha_ext[i] ^ carry[i];
    assign carry[i+1]   = alpha_ext[i] & carry[i];
  end

  assign alpha_int[8] = carry[8];

endmodule
