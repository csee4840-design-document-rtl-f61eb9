// tb_jacobi_eig: self-checking test of the Jacobi eigensolver at N = 9.
//
// Each test matrix is built with a known eigen-structure, M = H D H, where H
// is a random Householder reflection (orthogonal and symmetric) and D a
// diagonal of chosen eigenvalues. The expected smallest eigenvalue is the
// smallest entry of D and the expected eigenvector is the matching column of H
// (up to sign). A last case has a degenerate-free diagonal matrix, for which
// every rotation is skipped. The latency is checked against a bound.
module tb_jacobi_eig;
  import stereo_pkg::*;
  localparam int N = 9;
  logic clk = 0, rst_n = 1, start = 0;
  initial #1 rst_n = 0;  // asynchronous reset edge ahead of the first clock
  acc_t m_in [N][N];
  logic busy, done;
  un_t  evec [N];
  acc_t eval;
  int checks = 0, failures = 0;

  jacobi_eig #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
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

  real H [N][N];
  real D [N];
  real u [N];

  task automatic run_case(input int tcase, input bit diag_only);
    real nrm, val, dot;
    int  imin, cyc;
    nrm = 0;
    for (int i = 0; i < N; i++) begin
      u[i] = rsym(1000);
      nrm += u[i] * u[i];
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        H[i][j] = diag_only ? ((i == j) ? 1.0 : 0.0)
                            : ((i == j) ? 1.0 : 0.0) - 2.0 * u[i] * u[j] / nrm;
    imin = $urandom_range(N - 1);
    for (int i = 0; i < N; i++) D[i] = 1.0 + 0.7 * i + $urandom_range(100) / 1000.0;
    D[imin] = 0.001 * tcase;            // smallest
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        val = 0;
        for (int k = 0; k < N; k++) val += H[i][k] * D[k] * H[j][k];
        m_in[i][j] = acc_t'(val * 4294967296.0);
      end
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 0;
    while (!done) begin @(posedge clk); cyc++; end
    #1;
    $display("case %0d cycles %0d", tcase, cyc);
    check(cyc < 36 * 10 * 400, $sformatf("case %0d latency %0d", tcase, cyc));
    check((real'(eval) / 4294967296.0 - D[imin]) < 1e-5 &&
          (real'(eval) / 4294967296.0 - D[imin]) > -1e-5,
          $sformatf("case %0d eigenvalue %f expected %f", tcase, real'(eval) / 4294967296.0, D[imin]));
    dot = 0;
    for (int i = 0; i < N; i++) dot += (real'(evec[i]) / 1073741824.0) * H[i][imin];
    check(dot > 0.99999 || dot < -0.99999, $sformatf("case %0d |<v,h>| = %f", tcase, dot));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5; t++) run_case(t, 1'b0);
    run_case(7, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
