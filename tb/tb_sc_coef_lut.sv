// tb_sc_coef_lut -- self-checking testbench for sc_coef_lut.
//
// Instantiates LUT-A and LUT-B for all eight functions, in the default
// 8-segment build and in the 16-segment build, and reads every segment,
// comparing each word with the tables of sc_tb_pkg (hand-computed for 8
// segments, derived by the testbench's own line fit for 16).
module tb_sc_coef_lut;
  import sc_pkg::*;
  import sc_tb_pkg::*;

  logic [2:0] seg = '0;
  logic [9:0] coef_a [8];
  logic [9:0] coef_b [8];
  logic [3:0] seg16 = '0;
  logic [9:0] coef_a16 [8];
  logic [9:0] coef_b16 [8];

  for (genvar f = 0; f < 8; f++) begin : g_fn
    sc_coef_lut #(.FN(func_e'(f)), .SEL(LUT_A)) u_a (.seg, .coef (coef_a[f]));
    sc_coef_lut #(.FN(func_e'(f)), .SEL(LUT_B)) u_b (.seg, .coef (coef_b[f]));
    sc_coef_lut #(.FN(func_e'(f)), .SEL(LUT_A), .SEGS(16)) u_a16 (.seg (seg16), .coef (coef_a16[f]));
    sc_coef_lut #(.FN(func_e'(f)), .SEL(LUT_B), .SEGS(16)) u_b16 (.seg (seg16), .coef (coef_b16[f]));
  end

  int checks = 0;
  int failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++) begin
      seg = 3'(s);
      #1;
      for (int f = 0; f < 8; f++) begin
        checks += 2;
        if (int'(coef_a[f]) != LUTA[f][s]) begin
          failures++;
          $display("fn %0d seg %0d LUT-A %0d expected %0d", f, s, coef_a[f], LUTA[f][s]);
        end
        if (int'(coef_b[f]) != LUTB[f][s]) begin
          failures++;
          $display("fn %0d seg %0d LUT-B %0d expected %0d", f, s, coef_b[f], LUTB[f][s]);
        end
      end
    end
    for (int s = 0; s < 16; s++) begin
      seg16 = 4'(s);
      #1;
      for (int f = 0; f < 8; f++) begin
        checks += 2;
        if (int'(coef_a16[f]) != lut16(f, 1'b0, s)) begin
          failures++;
          $display("16 seg: fn %0d seg %0d LUT-A %0d expected %0d", f, s, coef_a16[f], lut16(f, 1'b0, s));
        end
        if (int'(coef_b16[f]) != lut16(f, 1'b1, s)) begin
          failures++;
          $display("16 seg: fn %0d seg %0d LUT-B %0d expected %0d", f, s, coef_b16[f], lut16(f, 1'b1, s));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
