// tb_centroid: self-checking test of thresholding and centroid extraction.
//
// Full 640x480 frames are streamed, eight pixels per beat, with random gaps.
// Each frame has a dim background and one or two bright rectangles; the
// expected area and centroid are worked out from the rectangles. Checks the
// area, the Q16.16 centroid (exact to the divider's truncation), rejection
// when the area is outside AREA_LIMS or zero, pixels equal to the threshold
// counting as background, and the one-beat-per-clock rate.
module tb_centroid;
  import stereo_pkg::*;
  localparam int W = 640, H = 480;
  logic clk = 0, rst_n = 1, start = 0;
  initial #1 rst_n = 0;  // asynchronous reset edge ahead of the first clock
  logic [7:0] threshold;
  logic [15:0] area_min, area_max;
  logic px_valid, px_ready;
  logic [63:0] px_data;
  logic busy, done, valid;
  logic [31:0] area;
  pt_t cx, cy;
  int checks = 0, failures = 0;

  centroid #(.IMG_W(W), .IMG_H(H)) dut (.*);
  always #5 clk = ~clk;

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

  int rx0 [2], rx1 [2], ry0 [2], ry1 [2];
  int nrect;

  function automatic logic [7:0] pix(input int x, input int y);
    for (int r = 0; r < nrect; r++)
      if (x >= rx0[r] && x <= rx1[r] && y >= ry0[r] && y <= ry1[r]) return 8'd200;
    if ((x + y) % 97 == 0) return threshold;    // equal to threshold: background
    return 8'((x * 3 + y) % 50);
  endfunction

  task automatic run(input int gap_pct);
    longint a, sx, sy;
    int beats, cyc;
    a = 0; sx = 0; sy = 0;
    for (int r = 0; r < nrect; r++)
      for (int y = ry0[r]; y <= ry1[r]; y++)
        for (int x = rx0[r]; x <= rx1[r]; x++) begin a++; sx += x; sy += y; end
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    beats = 0; cyc = 0;
    while (beats < W * H / 8) begin
      px_valid = ($urandom_range(99) >= gap_pct);
      for (int i = 0; i < 8; i++) px_data[8*i +: 8] = pix((beats * 8 + i) % W, (beats * 8 + i) / W);
      @(posedge clk);
      cyc++;
      if (px_valid && px_ready) beats++;
      #1;
    end
    px_valid = 0;
    while (!done) begin @(posedge clk); cyc++; end
    #1;
    check(area == 32'(a), $sformatf("area %0d expected %0d", area, a));
    if (a > 0 && a >= area_min && a <= area_max) begin
      check(valid, "frame rejected");
      check(cx == pt_t'((sx << 16) / a) && cy == pt_t'((sy << 16) / a),
            $sformatf("centroid (%f,%f) expected (%f,%f)", real'(cx) / 65536.0, real'(cy) / 65536.0,
                      real'(sx) / a, real'(sy) / a));
    end else check(!valid, "frame accepted outside area limits");
    if (gap_pct == 0) check(cyc <= W * H / 8 + 120, $sformatf("rate: %0d cycles", cyc));
  endtask

  initial begin
    px_valid = 0; px_data = '0;
    threshold = 8'd128; area_min = 16'd4; area_max = 16'd400;
    repeat (3) @(negedge clk);
    rst_n = 1;
    nrect = 1; rx0[0] = 317; rx1[0] = 322; ry0[0] = 201; ry1[0] = 205;
    run(0);
    nrect = 2; rx0[1] = 5; rx1[1] = 6; ry0[1] = 470; ry1[1] = 479;
    run(30);
    nrect = 1; rx0[0] = 630; rx1[0] = 639; ry0[0] = 0; ry1[0] = 50;    // area 510 > max
    run(10);
    nrect = 1; rx0[0] = 10; rx1[0] = 10; ry0[0] = 10; ry1[0] = 10;     // area 1 < min
    run(0);
    nrect = 0;                                                        // nothing bright
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
