// tb_triangulate: self-checking test of linear triangulation.
//
// With P1 = [I | 0] and P2 = [R | t] of the reference scene, known 3D points
// are projected in floating point, quantised to Q16.16 and triangulated. The
// result must match the point to within 0.2 % of its depth, and the latency
// must stay below a bound.
module tb_triangulate;
  import stereo_pkg::*;
  import tb_geom_pkg::*;
  logic clk = 0, rst_n = 1, start = 0;
  initial #1 rst_n = 0;  // asynchronous reset edge ahead of the first clock
  un_t p1 [3][4], p2 [3][4];
  pt_t x1, y1, x2, y2;
  logic busy, done;
  un_t xh [4];
  pt_t xyz [3];
  int checks = 0, failures = 0;

  triangulate dut (.*);
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

  initial begin
    mat3 r;
    vec3 t, xa, xb;
    int cyc;
    real err;
    r = ref_r();
    t = ref_t();
    for (int i = 0; i < 3; i++) begin
      for (int j = 0; j < 3; j++) begin
        p1[i][j] = (i == j) ? UN_ONE : '0;
        p2[i][j] = q30(r[i][j]);
      end
      p1[i][3] = '0;
      p2[i][3] = q30(t[i]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 1; k <= 8; k++) begin
      xa = scene_point(k);
      xb = to_b(xa);
      x1 = q16(xa[0] / xa[2]); y1 = q16(xa[1] / xa[2]);
      x2 = q16(xb[0] / xb[2]); y2 = q16(xb[1] / xb[2]);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 0;
      while (!done) begin @(posedge clk); cyc++; end
      #1;
      err = 0;
      for (int i = 0; i < 3; i++) err += fabs(f16(xyz[i]) - xa[i]);
      check(err < 0.002 * xa[2], $sformatf("point %0d got (%f %f %f) expected (%f %f %f)", k,
            f16(xyz[0]), f16(xyz[1]), f16(xyz[2]), xa[0], xa[1], xa[2]));
      check(cyc < 20000, $sformatf("latency %0d", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
