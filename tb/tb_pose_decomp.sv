// tb_pose_decomp: self-checking test of pose decomposition.
//
// The true essential matrix of the reference scene (and its negation, which
// describes the same geometry) is decomposed. Checks: the corrected E equals
// the input up to scale with equal non-zero singular values, every candidate
// rotation is orthonormal with determinant +1, the translations are unit
// vectors equal to +-t, exactly the two rotations R and (2tt^T - I)R appear,
// and one candidate equals the true pose (R, t).
module tb_pose_decomp;
  import stereo_pkg::*;
  import tb_geom_pkg::*;
  logic clk = 0, rst_n = 1, start = 0;
  initial #1 rst_n = 0;  // asynchronous reset edge ahead of the first clock
  un_t e_raw [3][3];
  logic busy, done;
  un_t e_fix [3][3];
  un_t cand_r [4][3][3];
  un_t cand_t [4][3];
  int checks = 0, failures = 0;

  pose_decomp dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (500_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input real sgn);
    mat3 e, r, rt;
    vec3 t;
    real d, err, ef_n, ratio;
    int match_true, match_twist;
    e = ref_e();
    r = ref_r();
    t = ref_t();
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        e_raw[i][j] = q30(sgn * e[i][j]);
        rt[i][j] = 0;
        for (int k = 0; k < 3; k++) rt[i][j] += (2 * t[i] * t[k] - (i == k ? 1.0 : 0.0)) * r[k][j];
      end
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done); #1;
    // e_fix = E up to scale: E has singular values (s, s, 0) with s = 1/sqrt(2).
    err = 0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) err += fabs(f30(e_fix[i][j]) - sgn * e[i][j]);
    check(err < 1e-4, $sformatf("sign %f: e_fix differs from E by %e", sgn, err));
    match_true = 0; match_twist = 0;
    for (int c = 0; c < 4; c++) begin
      real det, orth, tn, tt, er, ew;
      det = f30(cand_r[c][0][0]) * (f30(cand_r[c][1][1]) * f30(cand_r[c][2][2]) - f30(cand_r[c][1][2]) * f30(cand_r[c][2][1]))
          - f30(cand_r[c][0][1]) * (f30(cand_r[c][1][0]) * f30(cand_r[c][2][2]) - f30(cand_r[c][1][2]) * f30(cand_r[c][2][0]))
          + f30(cand_r[c][0][2]) * (f30(cand_r[c][1][0]) * f30(cand_r[c][2][1]) - f30(cand_r[c][1][1]) * f30(cand_r[c][2][0]));
      check(fabs(det - 1.0) < 1e-5, $sformatf("candidate %0d det %f", c, det));
      orth = 0;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) begin
          d = 0;
          for (int k = 0; k < 3; k++) d += f30(cand_r[c][k][i]) * f30(cand_r[c][k][j]);
          orth += fabs(d - (i == j ? 1.0 : 0.0));
        end
      check(orth < 1e-5, $sformatf("candidate %0d not orthonormal %e", c, orth));
      tt = 0;
      for (int i = 0; i < 3; i++) tt += f30(cand_t[c][i]) * t[i];
      check(fabs(fabs(tt) - 1.0) < 1e-5, $sformatf("candidate %0d t not +-t (%f)", c, tt));
      er = 0; ew = 0;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) begin
          er += fabs(f30(cand_r[c][i][j]) - r[i][j]);
          ew += fabs(f30(cand_r[c][i][j]) - rt[i][j]);
        end
      if (er < 1e-4 && tt > 0) match_true++;
      if (er < 1e-4 || ew < 1e-4) match_twist++;
    end
    check(match_true == 1, $sformatf("sign %f: true pose found %0d times", sgn, match_true));
    check(match_twist == 4, $sformatf("sign %f: %0d candidates are R or its twist", sgn, match_twist));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(1.0);
    run(-1.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
