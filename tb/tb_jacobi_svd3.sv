// tb_jacobi_svd3: self-checking test of the 3x3 Jacobi SVD.
//
// Random matrices with entries in [-0.5, 0.5] and rank-2 matrices of unit
// Frobenius norm (like an essential matrix) are decomposed. The checks are
// properties that any correct SVD has, computed in floating point here:
// U and V orthogonal, U * diag(sig) * V^T equal to the input, and the sum of squared singular values equal to the squared
// Frobenius norm of the input, singular values non-negative and sorted. A
// diagonal input with a known answer is also run. The latency is checked against a bound.
module tb_jacobi_svd3;
  import stereo_pkg::*;
  logic clk = 0, rst_n = 1, start = 0;
  initial #1 rst_n = 0;  // asynchronous reset edge ahead of the first clock
  un_t a_in [3][3];
  logic busy, done;
  un_t u [3][3], sig [3], v [3][3];
  int checks = 0, failures = 0;

  jacobi_svd3 dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Uniform random value in [-half, half] / 1000.
  function automatic real rsym(input int half);
    int v;
    v = int'($urandom_range(2 * half));
    return real'(v - half) / 1000.0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real r(input un_t x); return real'(x) / 1073741824.0; endfunction

  real A [3][3];

  task automatic run_case(input int tcase, input bit rank2);
    real e_orth_u, e_orth_v, e_rec, d, fro, ssum, x[3], y[3], nrm;
    int cyc;
    if (rank2) begin
      // A = x1 y1^T + 0.5 x2 y2^T, normalised
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) A[i][j] = 0;
      for (int term = 0; term < 2; term++) begin
        for (int i = 0; i < 3; i++) begin
          x[i] = rsym(1000);
          y[i] = rsym(1000);
        end
        for (int i = 0; i < 3; i++)
          for (int j = 0; j < 3; j++) A[i][j] += (term == 0 ? 1.0 : 0.5) * x[i] * y[j];
      end
      nrm = 0;
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) nrm += A[i][j] * A[i][j];
      nrm = $sqrt(nrm);
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) A[i][j] /= nrm;
    end else begin
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) A[i][j] = rsym(500);
    end
    fro = 0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        a_in[i][j] = un_t'(A[i][j] * 1073741824.0);
        fro += A[i][j] * A[i][j];
      end
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 0;
    while (!done) begin @(posedge clk); cyc++; end
    #1;
    e_orth_u = 0; e_orth_v = 0; e_rec = 0; ssum = 0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        real du, dv, rec;
        du = 0; dv = 0; rec = 0;
        for (int k = 0; k < 3; k++) begin
          du += r(u[k][i]) * r(u[k][j]);
          dv += r(v[k][i]) * r(v[k][j]);
          rec += r(u[i][k]) * r(sig[k]) * r(v[j][k]);
        end
        d = du - ((i == j) ? 1.0 : 0.0); if (d < 0) d = -d; if (d > e_orth_u) e_orth_u = d;
        d = dv - ((i == j) ? 1.0 : 0.0); if (d < 0) d = -d; if (d > e_orth_v) e_orth_v = d;
        d = rec - A[i][j]; if (d < 0) d = -d; if (d > e_rec) e_rec = d;
        if (i == j) ssum += r(sig[i]) * r(sig[i]);
      end
    check(e_orth_u < 1e-6, $sformatf("case %0d U not orthogonal %e", tcase, e_orth_u));
    check(e_orth_v < 1e-6, $sformatf("case %0d V not orthogonal %e", tcase, e_orth_v));
    check(sig[0] >= sig[1] && sig[1] >= sig[2] && sig[2] >= 0,
          $sformatf("case %0d singular values not sorted", tcase));
    if (rank2) check(r(sig[2]) < 1e-6, $sformatf("case %0d rank-2 smallest %e", tcase, r(sig[2])));
    check(e_rec < 1e-6, $sformatf("case %0d reconstruction %e", tcase, e_rec));
    d = ssum - fro; if (d < 0) d = -d;
    check(d < 1e-6, $sformatf("case %0d singular value energy %e", tcase, d));
    check(cyc < 6 * 8 * 400, $sformatf("case %0d latency %0d", tcase, cyc));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) run_case(t, t[0]);
    // Known answer: diag(0.1, -0.4, 0.25) -> 0.4, 0.25, 0.1
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) a_in[i][j] = '0;
    a_in[0][0] = un_t'(0.1 * 1073741824.0);
    a_in[1][1] = un_t'(-0.4 * 1073741824.0);
    a_in[2][2] = un_t'(0.25 * 1073741824.0);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done); #1;
    check(r(sig[0]) > 0.399999 && r(sig[0]) < 0.400001 && r(sig[1]) > 0.249999 &&
          r(sig[1]) < 0.250001 && r(sig[2]) > 0.099999 && r(sig[2]) < 0.100001,
          "diagonal known answer");
    check(r(u[1][0]) * r(v[1][0]) < -0.99, "sign carried by U for a negative entry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
