// tb_stereo_top: end-to-end test of the whole accelerator at its default size
// (640x480 frames, 512-deep FIFO, 16-beat bursts, 32 calibration pairs).
//
// The behavioural DDR model serves four frame buffers in which the test draws
// a 4x4 beacon blob at the projection of a known 3D point of the reference
// scene (camera B posed by R, t relative to camera A, pinhole cameras with
// f = 600 px and the principal point at the centre). Software behaviour is
// imitated through the Avalon-MM slave:
//   1. configure the buffers, threshold and area limits;
//   2. a runtime request before calibration must end in error;
//   3. a frame with an oversized blob must be rejected (area limits);
//   4. 32 calibration frames, alternating ACTIVE_BUF (double buffering),
//      must end with STATUS.calibrated;
//   5. runtime frames must report RESULT_X/Y/Z equal to the known point
//      (baseline units) within 5 % of its depth (the 4x4 blob quantises each
//      centroid to +-0.5 px, which alone gives errors of a few per cent);
//   6. clear_result and CONTROL.reset must clear the flags.
// Each runtime operation (two frames read, centroids, triangulation) must
// take at least the 2 x 38,400 beats of its frames and less than one frame
// period at 30 frames/s with an assumed 50 MHz clock (1,666,666 cycles).
// Mechanisms counted (each must occur): Avalon waitrequest stalls, buffer
// switches, area rejection, not-calibrated error, calibration-to-runtime mode
// switch, pose estimation, triangulations, clears and reset.
module tb_stereo_top;
  import stereo_pkg::*;
  import tb_geom_pkg::*;
  localparam int W = 640, H = 480;
  localparam real F = 600.0, CU = 320.0, CV = 240.0;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // asynchronous reset edge ahead of the first clock
  logic [3:0]  avs_address = '0;
  logic        avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic [31:0] avm_address;
  logic        avm_read, avm_waitrequest, avm_readdatavalid;
  logic [4:0]  avm_burstcount;
  logic [63:0] avm_readdata;
  int checks = 0, failures = 0;

  stereo_top dut (.*);
  ddr_model #(.IMG_W(W), .IMG_H(H), .BW(5)) ddr (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); avs_address = 4'(a); avs_writedata = d; avs_write = 1;
    @(negedge clk); avs_write = 0;
  endtask
  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk); avs_address = 4'(a); avs_read = 1;
    @(negedge clk); avs_read = 0; d = avs_readdata;
  endtask

  // Draw a 4x4 blob centred near the projection (u, v) into buffer b.
  task automatic draw(input int b, input real u, input real v);
    ddr.blob_x0[b] = int'($floor(u)) - 1; ddr.blob_x1[b] = int'($floor(u)) + 2;
    ddr.blob_y0[b] = int'($floor(v)) - 1; ddr.blob_y1[b] = int'($floor(v)) + 2;
  endtask

  int n_buf_switch = 0, n_reject = 0, n_notcal = 0, n_mode_switch = 0, n_pose = 0;
  int n_tri = 0, n_clear = 0, n_reset = 0;
  logic [1:0] last_buf = 2'b00;

  // Cycle count of the last operation, from the start write to done seen.
  // At 30 frames/s and an assumed 50 MHz clock a frame pair has 1,666,666
  // clocks; both frames must be read, which takes at least 2 * 38,400 beats.
  localparam longint FRAME_BUDGET = 50_000_000 / 30;
  localparam longint MIN_CYCLES   = 2 * 640 * 480 / 8;
  longint cyc = 0, op_cycles = 0, run_max = 0, cal_last = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic frame(input int k, input logic [1:0] buf_sel, output logic [31:0] status);
    vec3 xa, xb;
    logic [31:0] s;
    xa = scene_point(k);
    xb = to_b(xa);
    draw({1'b0, buf_sel[0]}, F * xa[0] / xa[2] + CU, F * xa[1] / xa[2] + CV);
    draw({1'b1, buf_sel[1]}, F * xb[0] / xb[2] + CU, F * xb[1] / xb[2] + CV);
    if (buf_sel != last_buf) n_buf_switch++;
    last_buf = buf_sel;
    wr(7, 32'(buf_sel));
    wr(0, 32'h1);
    op_cycles = cyc;
    do rd(1, s); while (!s[1]);
    op_cycles = cyc - op_cycles;
    status = s;
    wr(0, 32'h4);
  endtask

  initial begin
    logic [31:0] s, d;
    vec3 xa;
    real err;
    repeat (5) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 4; b++) wr(3 + b, ddr.fb_base[b]);
    wr(8, 32'd128);
    wr(9, {16'd64, 16'd4});

    // 2. runtime before calibration
    wr(2, 32'h0);
    frame(1, 2'b00, s);
    check(s[4] && !s[2] && !s[3], "runtime before calibration must set error");
    rd(15, d);
    if (s[4] && d[23:16] == ERR_NOT_CAL) n_notcal++;
    wr(0, 32'h8); n_clear++;

    // 3. oversized blob in camera A is rejected
    ddr.blob_x0[1] = 10; ddr.blob_x1[1] = 30; ddr.blob_y0[1] = 10; ddr.blob_y1[1] = 30;
    wr(7, 32'h1); last_buf = 2'b01;
    wr(0, 32'h1);
    do rd(1, s); while (!s[1]);
    check(s[4] && !s[5], "oversized blob must be rejected");
    rd(15, d);
    if (d[23:16] == ERR_AREA_A) n_reject++;
    wr(0, 32'hC); n_clear++;

    // 4. calibration
    wr(2, 32'h1);
    for (int f = 0; f < 32; f++) begin
      frame(100 + f, 2'(f % 4), s);
      check(s[5] && !s[4], $sformatf("calibration frame %0d not consumed cleanly", f));
    end
    check(s[2], "not calibrated after 32 pairs");
    cal_last = op_cycles;
    $display("last calibration operation (frames + pose solve): %0d cycles", cal_last);
    if (s[2]) n_pose++;
    rd(15, d);
    $display("calibration: candidate %0d chosen, pairs logged now %0d", d[9:8], d[31:24]);

    // 5. runtime
    wr(2, 32'h0); n_mode_switch++;
    for (int k = 0; k < 6; k++) begin
      logic [31:0] rx, ry, rz;
      frame(300 + 7 * k, 2'(k % 4), s);
      check(s[3] && !s[4], $sformatf("runtime frame %0d: no result", k));
      rd(10, rx); rd(11, ry); rd(12, rz);
      xa = scene_point(300 + 7 * k);
      err = fabs(f16(rx) - xa[0]) + fabs(f16(ry) - xa[1]) + fabs(f16(rz) - xa[2]);
      $display("point %0d: result (%f, %f, %f) true (%f, %f, %f)", k, f16(rx), f16(ry), f16(rz),
               xa[0], xa[1], xa[2]);
      check(err < 0.05 * xa[2], $sformatf("runtime frame %0d: error %f", k, err));
      if (s[3]) n_tri++;
      if (op_cycles > run_max) run_max = op_cycles;
      check(op_cycles >= MIN_CYCLES, $sformatf("runtime frame %0d: %0d cycles is too fast", k, op_cycles));
    end
    $display("runtime operation: at most %0d cycles (budget %0d)", run_max, FRAME_BUDGET);
    check(run_max < FRAME_BUDGET, "runtime operation exceeds one frame period at 50 MHz");

    // 6. clears and reset
    wr(0, 32'h10); n_clear++;
    rd(1, d); check(!d[3], "clear_result");
    wr(0, 32'h2);
    rd(1, d); check(d[2] == 1'b0 && d[0] == 1'b0, "reset must clear calibrated and busy");
    if (!d[2]) n_reset++;
    rd(3, d); check(d == ddr.fb_base[0], "reset keeps the frame addresses");

    // mechanisms
    $display("stalls=%0d buffer_switches=%0d rejects=%0d not_calibrated=%0d mode_switches=%0d pose=%0d tri=%0d clears=%0d resets=%0d",
             ddr.stall_cycles, n_buf_switch, n_reject, n_notcal, n_mode_switch, n_pose, n_tri, n_clear, n_reset);
    check(ddr.stall_cycles > 0, "no waitrequest stall");
    check(n_buf_switch > 0, "no buffer switch");
    check(n_reject > 0, "no area rejection");
    check(n_notcal > 0, "no not-calibrated error");
    check(n_mode_switch > 0, "no mode switch");
    check(n_pose > 0, "no pose estimation");
    check(n_tri > 0, "no triangulation");
    check(n_clear > 0 && n_reset > 0, "no clear or reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
