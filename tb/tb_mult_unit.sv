// Test of the multiplier with its feedback circuit, used as the Compositor
// uses it. Each round: load beta (A) and alpha (B); two clocks later the small
// product beta*alpha/16 must be in p_small; INC feeds 1.0 - that back into A,
// which then stays while three colour bytes stream through B, each product
// factor*colour/256 due in p_large two clocks after its operands are
// registered. An alpha*alpha/256 product follows. Rounds overlap nothing.
module tb_mult_unit;
  logic clk = 1'b0, rst = 1'b1;
  logic [8:0] a_ext, b_in, p_small, p_large, a_reg;
  logic a_fb_sel, a_load;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mult_unit dut (.clk, .rst, .a_ext, .a_fb_sel, .a_load, .b_in, .p_small, .p_large, .a_reg);

  task automatic step(logic load, logic fb, int aval, int bval);
    a_load = load; a_fb_sel = fb; a_ext = 9'(aval); b_in = 9'(bval);
    @(negedge clk);
  endtask

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int beta, alpha, f, rgb[3], a2, a3;
    a_ext = '0; b_in = '0; a_load = 0; a_fb_sel = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int it = 0; it < 300; it++) begin
      beta  = int'($urandom % 17);
      alpha = ($urandom % 4 == 0) ? 256 : int'($urandom % 257);
      for (int i = 0; i < 3; i++) rgb[i] = int'($urandom % 256);
      a2 = ($urandom % 3 == 0) ? 256 : int'($urandom % 257);
      a3 = int'($urandom % 257);
      f  = 256 - (beta * alpha) / 16;
      step(1, 0, beta, alpha);          // c0: operands loaded at its end
      step(0, 0, 0, 0);                 // c1: operands in registers
      step(0, 0, 0, 0);                 // c2
      expect_eq("p_small", int'(p_small), (beta * alpha) / 16);   // c3
      step(1, 1, 0, rgb[0]);            // c3: A <- INC, B <- R
      expect_eq("factor", int'(a_reg), f);                        // c4
      step(0, 0, 0, rgb[1]);            // c4
      step(0, 0, 0, rgb[2]);            // c5
      expect_eq("F*R", int'(p_large), (f * rgb[0]) / 256);        // c6
      step(1, 0, a2, a3);               // c6: alpha pair
      expect_eq("F*G", int'(p_large), (f * rgb[1]) / 256);        // c7
      expect_eq("held factor", int'(a_reg), a2);
      step(0, 0, 0, 0);                 // c7
      expect_eq("F*B", int'(p_large), (f * rgb[2]) / 256);        // c8
      step(0, 0, 0, 0);                 // c8
      expect_eq("alpha*alpha", int'(p_large), (a2 * a3) / 256);   // c9
      step(0, 0, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
