// tb_ess_est: self-checking test of essential matrix estimation.
//
// A behavioural log memory holds normalized correspondences of the reference
// scene, quantised to Q16.16. After estimation E_raw must equal the true
// essential matrix [t]x R (unit Frobenius norm) up to sign, the smallest
// eigenvalue must be close to zero, and each logged pair must satisfy the
// epipolar constraint x2^T E x1 ~ 0. Runs with 8 (the minimum) and 32 pairs.
module tb_ess_est;
  import stereo_pkg::*;
  import tb_geom_pkg::*;
  localparam int MAXP = 32;
  logic clk = 0, rst_n = 1, start = 0;
  initial #1 rst_n = 0;  // asynchronous reset edge ahead of the first clock
  logic [$clog2(MAXP+1)-1:0] n_pairs;
  logic [$clog2(MAXP)-1:0]   rd_addr;
  pair_t rd_data;
  logic busy, done;
  un_t  e_raw [3][3];
  acc_t min_eval;
  int checks = 0, failures = 0;
  pair_t log_mem [MAXP];

  ess_est #(.MAX_PAIRS(MAXP)) dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) rd_data <= log_mem[rd_addr];

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input int np);
    mat3 e;
    vec3 xa, xb;
    real dot, res, worst;
    int cyc;
    for (int k = 0; k < np; k++) begin
      xa = scene_point(k + 3);
      xb = to_b(xa);
      log_mem[k] = '{xa: q16(xa[0] / xa[2]), ya: q16(xa[1] / xa[2]),
                     xb: q16(xb[0] / xb[2]), yb: q16(xb[1] / xb[2])};
    end
    n_pairs = ($clog2(MAXP+1))'(np);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 0;
    while (!done) begin @(posedge clk); cyc++; end
    #1;
    e = ref_e();
    dot = 0;
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) dot += f30(e_raw[i][j]) * e[i][j];
    check(fabs(dot) > 0.999, $sformatf("%0d pairs: |<E_raw, E>| = %f", np, dot));
    check(real'(min_eval) / 4294967296.0 < 1e-5, $sformatf("%0d pairs: min eigenvalue %e", np,
          real'(min_eval) / 4294967296.0));
    worst = 0;
    for (int k = 0; k < np; k++) begin
      real v1[3], v2[3];
      v1 = '{f16(log_mem[k].xa), f16(log_mem[k].ya), 1.0};
      v2 = '{f16(log_mem[k].xb), f16(log_mem[k].yb), 1.0};
      res = 0;
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) res += v2[i] * f30(e_raw[i][j]) * v1[j];
      if (fabs(res) > worst) worst = fabs(res);
    end
    check(worst < 1e-3, $sformatf("%0d pairs: epipolar residual %e", np, worst));
    check(cyc < np * 50 + 200000, $sformatf("%0d pairs: latency %0d", np, cyc));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(8);
    run(32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
