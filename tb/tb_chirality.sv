// tb_chirality: self-checking test of the chirality check.
//
// The four pose candidates of the reference scene, (R, +-t) and
// ((2tt^T - I)R, +-t), are presented in a different order in each run, so the
// true pose sits at every index once. With a matched point of the scene the
// block must choose the true pose, report ok, and output P1 = [I | 0] and
// P2 = [R | t]. A last run offers only wrong candidates and must report !ok.
module tb_chirality;
  import stereo_pkg::*;
  import tb_geom_pkg::*;
  logic clk = 0, rst_n = 1, start = 0;
  initial #1 rst_n = 0;  // asynchronous reset edge ahead of the first clock
  un_t cand_r [4][3][3];
  un_t cand_t [4][3];
  pt_t x1, y1, x2, y2;
  logic busy, done, ok;
  logic [1:0] sel;
  un_t p1 [3][4], p2 [3][4];
  int checks = 0, failures = 0;

  chirality dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok_, input string what);
    checks++;
    if (!ok_) begin failures++; $display("FAIL: %s", what); end
  endtask

  mat3 r, rt;
  vec3 t;

  task automatic load(input int slot, input int kind);
    // kind 0: (R,t) 1: (R,-t) 2: (Rt,t) 3: (Rt,-t)
    for (int i = 0; i < 3; i++) begin
      for (int j = 0; j < 3; j++) cand_r[slot][i][j] = q30(kind < 2 ? r[i][j] : rt[i][j]);
      cand_t[slot][i] = q30(kind[0] ? -t[i] : t[i]);
    end
  endtask

  initial begin
    vec3 xa, xb;
    real err;
    r = ref_r();
    t = ref_t();
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        rt[i][j] = 0;
        for (int k = 0; k < 3; k++) rt[i][j] += (2 * t[i] * t[k] - (i == k ? 1.0 : 0.0)) * r[k][j];
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 5; run++) begin
      xa = scene_point(run + 11);
      xb = to_b(xa);
      x1 = q16(xa[0] / xa[2]); y1 = q16(xa[1] / xa[2]);
      x2 = q16(xb[0] / xb[2]); y2 = q16(xb[1] / xb[2]);
      if (run < 4) begin
        for (int s = 0; s < 4; s++) load(s, (s - run + 4) % 4);   // true pose at slot `run`
      end else begin
        load(0, 1); load(1, 1); load(2, 3); load(3, 2);           // true pose absent
      end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      wait (done); #1;
      if (run < 4) begin
        check(ok, $sformatf("run %0d: no candidate accepted", run));
        check(sel == 2'(run), $sformatf("run %0d: selected %0d", run, sel));
        err = 0;
        for (int i = 0; i < 3; i++) begin
          for (int j = 0; j < 3; j++) begin
            err += fabs(f30(p2[i][j]) - r[i][j]);
            err += fabs(f30(p1[i][j]) - (i == j ? 1.0 : 0.0));
          end
          err += fabs(f30(p2[i][3]) - t[i]) + fabs(f30(p1[i][3]));
        end
        check(err < 1e-6, $sformatf("run %0d: projection matrices differ by %e", run, err));
      end else begin
        check(!ok, "wrong candidates accepted");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
