// normalize: maps a pixel centroid to normalized camera coordinates.
//
// Computes x~ = K^-1 x for a pinhole camera without skew,
//     xn = (u - CX) / FX,   yn = (v - CY) / FY,
// registering the result one clock after in_valid (out_valid). The inverse
// focal lengths are elaborated as Q0.32 constants from the parameters, so the
// datapath is one subtract and one multiply per axis. All coordinates are
// Q16.16. The intrinsic matrix comes from an offline camera calibration; its
// values are not part of the register map, so they are parameters here, with
// defaults for a generic 640x480 webcam (focal length 600 px, principal point
// at the image centre).
module normalize
  import stereo_pkg::*;
#(
  parameter int FX = 600 * 65536,   // focal length x, pixels, Q16.16
  parameter int FY = 600 * 65536,   // focal length y, pixels, Q16.16
  parameter int CX = 320 * 65536,   // principal point x, Q16.16
  parameter int CY = 240 * 65536    // principal point y, Q16.16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  pt_t  u,
  input  pt_t  v,
  output logic out_valid,
  output pt_t  xn,
  output pt_t  yn
);
  // 2^48 / F in Q16.16 gives 1/F in Q0.32.
  localparam logic [63:0] INV_FX = (64'd1 << 48) / 64'(FX);
  localparam logic [63:0] INV_FY = (64'd1 << 48) / 64'(FY);

  function automatic pt_t scale(input pt_t d, input logic [63:0] inv);
    logic signed [95:0] pr;
    pr = 96'(d) * $signed({32'h0, inv});
    return pt_t'(pr >>> 32);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; xn <= '0; yn <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        xn <= scale(u - pt_t'(CX), INV_FX);
        yn <= scale(v - pt_t'(CY), INV_FY);
      end
    end
  end
endmodule
