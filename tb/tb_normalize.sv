// tb_normalize: self-checking test of pixel-to-normalized conversion.
//
// Drives pixel coordinates over the whole 640x480 image (including the
// principal point and the corners) and compares xn = (u - cx)/fx and
// yn = (v - cy)/fy, computed here in floating point, with the registered
// output one clock later, to within 2 LSB of Q16.16. Uses non-default
// intrinsics to show the parameters take effect.
module tb_normalize;
  import stereo_pkg::*;
  localparam real FXR = 612.5, FYR = 598.25, CXR = 318.75, CYR = 243.5;
  logic clk = 0, rst_n = 1, in_valid = 0, out_valid;
  initial #1 rst_n = 0;  // asynchronous reset edge ahead of the first clock
  pt_t u, v, xn, yn;
  int checks = 0, failures = 0;

  normalize #(.FX(int'(FXR * 65536.0)), .FY(int'(FYR * 65536.0)),
              .CX(int'(CXR * 65536.0)), .CY(int'(CYR * 65536.0))) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic one(input real uu, input real vv);
    real ex, ey;
    u = pt_t'(uu * 65536.0); v = pt_t'(vv * 65536.0);
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    check(out_valid, "out_valid missing one clock after in_valid");
    ex = (real'(u) / 65536.0 - CXR) / FXR;
    ey = (real'(v) / 65536.0 - CYR) / FYR;
    check((real'(xn) / 65536.0 - ex) < 3e-5 && (real'(xn) / 65536.0 - ex) > -3e-5 &&
          (real'(yn) / 65536.0 - ey) < 3e-5 && (real'(yn) / 65536.0 - ey) > -3e-5,
          $sformatf("(%f,%f) -> (%f,%f) expected (%f,%f)", uu, vv,
                    real'(xn) / 65536.0, real'(yn) / 65536.0, ex, ey));
    @(negedge clk);
    check(!out_valid, "out_valid longer than one clock");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    one(CXR, CYR); one(0, 0); one(639.5, 479.5); one(0, 479); one(639, 0);
    for (int i = 0; i < 40; i++) one($urandom_range(63999) / 100.0, $urandom_range(47999) / 100.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
