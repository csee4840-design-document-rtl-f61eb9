// stereo_pkg: fixed-point number formats and shared types of the stereo
// tracking accelerator.
//
// Three formats are used throughout:
//   pt_t  : signed Q16.16, for pixel and normalized image coordinates and the
//           triangulated 3D result (what RESULT_X/Y/Z report).
//   un_t  : signed Q2.30, for values bounded by about one: rotation and
//           singular-vector entries, unit vectors, the cosine/sine of a Jacobi
//           rotation and homogeneous eigenvectors.
//   acc_t : signed 64-bit accumulators. A^T A is held as Q32.32.
// The 32-bit geometry values and 64-bit A^T A follow the storage sizes of the
// design's resource budget; the placement of the binary point is this
// implementation's choice.
package stereo_pkg;

  localparam int PT_FRAC = 16;
  localparam int UN_FRAC = 30;

  typedef logic signed [31:0] pt_t;
  typedef logic signed [31:0] un_t;
  typedef logic signed [63:0] acc_t;

  localparam un_t UN_ONE = 32'sh4000_0000;
  localparam pt_t PT_ONE = 32'sh0001_0000;

  // One matched pair of image points (camera A, camera B).
  typedef struct packed {
    pt_t xa;
    pt_t ya;
    pt_t xb;
    pt_t yb;
  } pair_t;

  // Register word offsets of the 16 x 32-bit Avalon-MM slave.
  typedef enum logic [3:0] {
    REG_CONTROL    = 4'h0,
    REG_STATUS     = 4'h1,
    REG_MODE       = 4'h2,
    REG_FRAME_A0   = 4'h3,
    REG_FRAME_A1   = 4'h4,
    REG_FRAME_B0   = 4'h5,
    REG_FRAME_B1   = 4'h6,
    REG_ACTIVE_BUF = 4'h7,
    REG_THRESHOLD  = 4'h8,
    REG_AREA_LIMS  = 4'h9,
    REG_RESULT_X   = 4'hA,
    REG_RESULT_Y   = 4'hB,
    REG_RESULT_Z   = 4'hC,
    REG_DEBUG0     = 4'hD,
    REG_DEBUG1     = 4'hE,
    REG_DEBUG2     = 4'hF
  } reg_t;

  // Error codes reported in DEBUG2[23:16].
  typedef enum logic [7:0] {
    ERR_NONE        = 8'd0,
    ERR_AREA_A      = 8'd1,
    ERR_AREA_B      = 8'd2,
    ERR_NOT_CAL     = 8'd3,
    ERR_CHIRALITY   = 8'd4
  } err_t;

  // Signed fixed-point multiply with an arithmetic right shift.
  function automatic logic signed [63:0] fmul(input logic signed [31:0] a,
                                              input logic signed [31:0] b,
                                              input int sh);
    logic signed [63:0] p;
    p = 64'(a) * 64'(b);
    return p >>> sh;
  endfunction

endpackage
