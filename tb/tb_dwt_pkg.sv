// tb_dwt_pkg -- checks the size formulas of dwt_pkg against worked numbers:
// one level for a 12-sample line with N = 4; 3 levels with 32/16/8
// coefficients for 32 samples; 5 and 3 levels for a 128 x 32 picture; 4 and
// 3 levels for 64 x 32; 6 and 6 for 352 x 288; the lifting-table layout.
// It also checks the predict-filter rows the testbenches load (Lagrange
// interpolation weights scaled by 2^14) against the published 4-tap filter
// table: 2.1875 -2.1875 1.3125 -0.3125 / 0.3125 0.9375 -0.3125 0.0625 /
// -0.0625 0.5625 0.5625 -0.0625, and the 2-tap rows 1.5 -0.5 / 0.5 0.5;
// and the moment-derived lifting coefficients of the reference model for a
// 16-sample line against the published tables for NT = 2 (3 levels) and
// NT = 4 (2 levels).
module tb_dwt_pkg;
  import dwt_pkg::*;
  import dwt_ref_pkg::pred_coef;
  import dwt_ref_pkg::dwt_model;

  task automatic chk_r(real got, real exp, real tol, string what);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL %s: %f expected %f", what, got, exp);
    end
  endtask
  int checks = 0, failures = 0;
  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    chk(num_levels(12, 4), 1, "levels L=12");
    chk(num_levels(32, 4), 3, "levels L=32");
    chk(level_len(32, 0), 32, "C level 0");
    chk(level_len(32, 1), 16, "C level 1");
    chk(level_len(32, 2), 8, "C level 2");
    chk(num_levels(128, 4), 5, "levels X=128");
    chk(num_levels(64, 4), 4, "levels X=64");
    chk(num_levels(352, 4), 6, "levels X=352");
    chk(num_levels(288, 4), 6, "levels Y=288");
    chk(num_levels(352, 2), 8, "levels X=352, N=2");
    chk(level_len(11, 1), 6, "C of 11 samples at level 1");
    chk(gamma_total(64, 4), 32 + 16 + 8 + 4, "gammas of 64 over 4 levels");
    chk(lift_base(1'b0, 2, 64, 32, 4), 48, "row level 2 base");
    chk(lift_base(1'b1, 0, 64, 32, 4), 60, "column level 0 base");
    chk(lift_base(1'b1, 2, 64, 32, 4), 60 + 24, "column level 2 base");
    chk(lift_depth(64, 32, 4), 60 + 28, "lifting table depth 64 x 32");
    chk(max2(4, 8), 8, "max2");
    chk(ceil_div(13, 4), 4, "ceil_div");
    chk(PRED_SCALE + UPD_SCALE, 28, "scales");
    begin
      static int t4[3][4] = '{'{35840, -35840, 21504, -5120}, '{5120, 15360, -5120, 1024},
                       '{-1024, 9216, 9216, -1024}};
      static int t2[2][2] = '{'{24576, -8192}, '{8192, 8192}};
      for (int r = 0; r < 3; r++) for (int j = 0; j < 4; j++)
        chk(pred_coef(4, r, j), t4[r][j], $sformatf("4-tap filter row %0d tap %0d", r, j));
      for (int r = 0; r < 2; r++) for (int j = 0; j < 2; j++)
        chk(pred_coef(2, r, j), t2[r][j], $sformatf("2-tap filter row %0d tap %0d", r, j));
    end
    begin
      dwt_model m2, m4;
      // NT = 2, L = 16: {level, gamma, L0, L1}, values printed to 2-4 digits
      static real t43[11][4] = '{'{0, 0, 0.4, 0.2}, '{0, 1, 0.25, 0.25}, '{0, 2, 0.25, 0.25},
                                 '{0, 3, 0.25, 0.25}, '{0, 4, 0.25, 0.25}, '{0, 7, -0.13, 0.4},
                                 '{1, 1, -4.5, 8.0}, '{1, 2, 0.27, 0.1883}, '{1, 3, -0.18, 0.4935},
                                 '{2, 0, 0.5588, 0.2294}, '{2, 1, -0.4118, 0.4941}};
      // NT = 4, L = 16, level 0 then level 1
      static real t44[12][4] = '{
        '{0.184628, 0.387125, -0.131771, 0.0272476}, '{-0.105268, 0.295406, 0.268679, -0.0284388},
        '{0.0079594, 0.32098, 0.190416, 0.014943},   '{-1.12943, 1.86682, -0.417554, -0.0467274},
        '{-0.0431522, 0.360257, 0.145585, 0.0507862}, '{-0.0377447, 0.309029, 0.233008, 0.0178615},
        '{0.0159595, -0.0828344, 0.311458, 0.333931}, '{-0.0180709, 0.0783563, -0.121172, 0.239113},
        '{0.55218, 0.30749, 0.0129941, -0.0883121},   '{-0.179825, 0.327006, 0.236753, -0.00309677},
        '{-0.0683047, 0.0619364, 0.154456, 0.34},     '{-0.183823, 0.121297, -0.186652, 0.23924}};
      m2 = new(16, 16, 2, 2);
      m2.make_lifting();
      chk(m2.nx, 3, "levels of a 16-sample line, N = 2");
      foreach (t43[k]) begin
        int a;
        a = m2.lift_base(0, int'(t43[k][0]));
        a = a + int'(t43[k][1]);
        for (int j = 0; j < 2; j++)
          chk_r(m2.rlift[a][j], t43[k][2 + j], 0.01,
                $sformatf("NT=2 level %0d gamma %0d coefficient %0d", int'(t43[k][0]) + 1, int'(t43[k][1]) + 1, j));
      end
      m4 = new(16, 16, 4, 4);
      m4.make_lifting();
      chk(m4.nx, 2, "levels of a 16-sample line, N = 4");
      foreach (t44[k]) for (int j = 0; j < 4; j++)
        chk_r(m4.rlift[k][j], t44[k][j], 1e-4, $sformatf("NT=4 table row %0d coefficient %0d", k, j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
