// Test of BETA: 600 pixels streamed back to back, six clocks each.
//
// For each pixel the eight corner Z values (Front and Back at TL, TR, BR, BL)
// are presented low byte in cycle 1 and high byte in cycle 2; the other cycles
// carry random bytes the unit must ignore. Beta must equal the reference
// (weighted count of the nine comparisons) in cycle 5 of the same pixel,
// which checks the pipeline depth of the thesis's beta timing table, and
// min_sel must say whether Back is nearer at BR. Corner values are drawn to
// include ties, nearly equal values and differences beyond 16 signed bits.
module tb_beta_unit;
  import comp_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [5:0] phase;
  logic [7:0] tl_f, tl_b, tr_f, tr_b, br_f, br_b, bl_f, bl_b;
  logic [4:0] beta;
  logic min_sel;
  int checks = 0, failures = 0;
  int confused = 0, extremes = 0;

  always #5 clk = ~clk;

  beta_unit dut (.clk, .rst, .phase, .tl_f, .tl_b, .tr_f, .tr_b, .br_f, .br_b,
                 .bl_f, .bl_b, .beta, .min_sel);

  function automatic int pick_z(int base);
    case ($urandom % 5)
      0: return base;                                  // tie
      1: return (base + int'($urandom % 9) - 4) & 16'hFFFF;
      2: return int'($urandom % 65536);
      3: return ($urandom % 2) ? 0 : 65535;
      default: return (base + int'($urandom % 2001) - 1000) & 16'hFFFF;
    endcase
  endfunction

  initial begin
    int zf[4], zb[4];
    int exp_beta;
    logic exp_min;
    phase = 6'b000001;
    {tl_f, tl_b, tr_f, tr_b, br_f, br_b, bl_f, bl_b} = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int p = 0; p < 600; p++) begin
      for (int i = 0; i < 4; i++) begin
        automatic int base = int'($urandom % 65536);
        zf[i] = pick_z(base);
        zb[i] = pick_z(base);
      end
      exp_beta = beta16(zf, zb);
      exp_min  = (zb[2] < zf[2]);
      if (exp_beta != 0 && exp_beta != 16) confused++; else extremes++;
      for (int k = 0; k < 6; k++) begin
        phase = 6'(1 << k);
        if (k == 1 || k == 2) begin
          automatic int sh = (k == 1) ? 0 : 8;
          tl_f = 8'(zf[0] >> sh); tl_b = 8'(zb[0] >> sh);
          tr_f = 8'(zf[1] >> sh); tr_b = 8'(zb[1] >> sh);
          br_f = 8'(zf[2] >> sh); br_b = 8'(zb[2] >> sh);
          bl_f = 8'(zf[3] >> sh); bl_b = 8'(zb[3] >> sh);
        end else begin
          {tl_f, tl_b, tr_f, tr_b} = $urandom;
          {br_f, br_b, bl_f, bl_b} = $urandom;
        end
        #1;
        if (k == 5) begin
          checks += 2;
          if (int'(beta) != exp_beta) begin
            failures++;
            $display("pixel %0d: beta %0d expected %0d (F %p B %p)", p, beta, exp_beta, zf, zb);
          end
          if (min_sel != exp_min) begin
            failures++;
            $display("pixel %0d: min_sel %b expected %b", p, min_sel, exp_min);
          end
        end
        @(negedge clk);
      end
    end
    checks++;
    if (confused == 0 || extremes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
