// tb_control_asm: self-checking test of the register agent and control FSM.
//
// The datapath around the block is replaced by simple responders: a frame
// start is answered by cent_done after a delay with a centroid that encodes
// the frame base, the log write and pose/triangulation completions are
// answered likewise. Through the Avalon-MM slave the test checks register
// read-back and reserved bits, read-only STATUS/RESULT, frame-base selection
// by ACTIVE_BUF, the STATUS flags over runtime-before-calibration (error),
// calibration (log filling, pose estimation, calibrated), runtime
// (RESULT_X/Y/Z, result_valid), area rejection (error), the clear bits and
// CONTROL.reset.
module tb_control_asm;
  import stereo_pkg::*;
  localparam int CP = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // asynchronous reset edge ahead of the first clock
  logic [3:0] avs_address;
  logic avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata, avs_readdata;
  logic pipe_rst, calibration_mode, calibrated;
  logic [7:0] threshold;
  logic [15:0] area_min, area_max;
  logic frame_start;
  logic [31:0] frame_base;
  logic cent_done = 0, cent_valid = 0;
  pt_t cent_x, cent_y;
  logic pair_valid;
  pair_t pair_px;
  logic log_written = 0, log_full, log_clear, pose_start, pose_done = 0, pose_ok = 1;
  logic [$clog2(CP+1)-1:0] log_count;
  logic [1:0] pose_sel = 2'd2;
  logic tri_done = 0;
  pt_t tri_x, tri_y, tri_z;
  int checks = 0, failures = 0;

  control_asm #(.CAL_PAIRS(CP)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
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

  // Datapath responders.
  logic        reject_next = 0;
  logic [31:0] bases [$];
  int          pose_runs = 0, tri_runs = 0;
  always @(posedge clk) begin
    if (frame_start) begin
      bases.push_back(frame_base);
      fork begin
        logic [31:0] b;
        b = frame_base;
        repeat (20) @(posedge clk);
        cent_x <= pt_t'({b[15:0], 16'h8000});
        cent_y <= pt_t'({16'(b[31:16]), 16'h0});
        cent_valid <= !reject_next;
        cent_done <= 1;
        @(posedge clk) cent_done <= 0;
      end join_none
    end
    if (pair_valid) fork begin
      repeat (2) @(posedge clk);
      if (calibration_mode) begin
        log_count <= log_count + 1'b1;
        log_written <= 1;
        @(posedge clk) log_written <= 0;
      end
    end join_none
    if (pose_start) fork begin
      pose_runs++;
      repeat (30) @(posedge clk);
      pose_done <= 1;
      @(posedge clk) pose_done <= 0;
    end join_none
    if (pair_valid && !calibration_mode) fork begin
      tri_runs++;
      repeat (10) @(posedge clk);
      tri_x <= 32'sh0001_8000; tri_y <= -32'sh0000_4000; tri_z <= 32'sh0005_0000;
      tri_done <= 1;
      @(posedge clk) tri_done <= 0;
    end join_none
    if (log_clear) log_count <= '0;
  end
  assign log_full = (log_count == ($clog2(CP+1))'(CP));

  task automatic op(output logic [31:0] status);
    logic [31:0] s;
    wr(0, 32'h1);                        // start
    rd(1, s);
    check(s[0], "busy not set after start");
    do rd(1, s); while (!s[1]);
    check(!s[0], "busy still set with done");
    status = s;
    wr(0, 32'h4);                        // clear_done
  endtask

  initial begin
    logic [31:0 ] d, s;
    log_count = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // register file
    wr(3, 32'h1000_0000); wr(4, 32'h1010_0000); wr(5, 32'h1020_0000); wr(6, 32'h1030_0000);
    wr(8, 32'hFFFF_FF80); wr(9, 32'h0190_0004); wr(2, 32'hFFFF_FFF8);
    rd(3, d); check(d == 32'h1000_0000, "FRAME_A0 read-back");
    rd(6, d); check(d == 32'h1030_0000, "FRAME_B1 read-back");
    rd(8, d); check(d == 32'h80 && threshold == 8'h80, "THRESHOLD reserved bits");
    rd(9, d); check(d == 32'h0190_0004 && area_max == 16'h190 && area_min == 16'h4, "AREA_LIMS");
    rd(2, d); check(d == 32'h0 && !calibration_mode, "MODE reserved bits");
    wr(1, 32'hFFFF_FFFF); rd(1, d); check(d == 32'h0, "STATUS is read-only");
    wr(10, 32'h1234); rd(10, d); check(d == 32'h0, "RESULT_X is read-only");
    // runtime before calibration -> error
    op(s);
    check(s[4] && !s[2] && !s[3], "runtime before calibration must set error only");
    rd(15, d); check(d[23:16] == ERR_NOT_CAL, "error code not-calibrated");
    wr(0, 32'h8); rd(1, d); check(!d[4], "clear_error");
    // calibration: CP frames, buffers alternate
    wr(2, 32'h3);                        // calibration mode, algorithm 1
    bases.delete();
    for (int f = 0; f < CP; f++) begin
      wr(7, 32'(f % 4));
      op(s);
      check(s[5], "frame_ready not set");
      check(s[2] == (f == CP - 1), $sformatf("calibrated after frame %0d", f));
    end
    check(pose_runs == 1, $sformatf("pose estimation ran %0d times", pose_runs));
    check(bases.size() == 2 * CP, "two frame reads per operation");
    for (int f = 0; f < CP; f++) begin
      check(bases[2*f]   == ((f % 2) ? 32'h1010_0000 : 32'h1000_0000), $sformatf("camera A base, frame %0d", f));
      check(bases[2*f+1] == ((f / 2 % 2) ? 32'h1030_0000 : 32'h1020_0000), $sformatf("camera B base, frame %0d", f));
    end
    rd(15, d); check(d[9:8] == 2'd2 && d[11:10] == 2'd1, "DEBUG2 pose candidate / algorithm select");
    rd(13, d); check(d == {16'h1000, 16'h0000} || d == {16'h1010, 16'h0000}, "DEBUG0 centroid A");
    // runtime
    wr(2, 32'h0);
    op(s);
    check(s[3] && !s[4], "result_valid after runtime frame");
    rd(10, d); check(d == 32'h0001_8000, "RESULT_X");
    rd(11, d); check(d == 32'hFFFF_C000, "RESULT_Y");
    rd(12, d); check(d == 32'h0005_0000, "RESULT_Z");
    check(tri_runs == 1, "one triangulation");
    wr(0, 32'h10); rd(1, d); check(!d[3], "clear_result");
    // area rejection
    reject_next = 1;
    op(s);
    check(s[4] && !s[5], "area rejection must set error, not frame_ready");
    rd(15, d); check(d[23:16] == ERR_AREA_A, "error code area A");
    reject_next = 0;
    // reset
    wr(0, 32'h2);
    rd(1, d); check(d == 32'h0, "reset clears status");
    rd(3, d); check(d == 32'h1000_0000, "reset keeps configuration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
