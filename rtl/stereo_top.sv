// stereo_top: FPGA accelerator for uncalibrated stereo tracking of an IR beacon.
//
// Two webcam frames per operation are fetched from HPS DDR, thresholded and
// reduced to one beacon centroid each. During calibration the centroid pairs
// are logged until CAL_PAIRS are held; then the relative pose of the cameras
// is recovered once (essential matrix by the eight-point method, SVD-based
// pose decomposition into four candidates, chirality check) and the two
// projection matrices are kept. At runtime each new pair is triangulated
// with those matrices and the 3D position is reported in the result
// registers.
//
// Data path:
//   control_asm --frame base--> ddr_reader --beats--> pixel_fifo --> centroid
//   centroid --> control_asm --pixel pair--> normalize (A, B) --> pair_router
//   pair_router --cal--> calib_log --> ess_est --> pose_decomp --> chirality
//   pair_router --run--> triangulate (P1, P2 from chirality) --> control_asm
// Interfaces: a 16 x 32-bit Avalon-MM slave (word address, read latency 1)
// for software, and a 32-bit address / 64-bit data Avalon-MM burst read
// master towards DDR. CONTROL.reset drives a one-clock reset of everything
// but the register file; that reset comes from a flip-flop, so it is free of
// glitches.
module stereo_top
  import stereo_pkg::*;
#(
  parameter int IMG_W      = 640,
  parameter int IMG_H      = 480,
  parameter int FIFO_DEPTH = 512,
  parameter int BURST      = 16,
  parameter int CAL_PAIRS  = 32,
  parameter int FX_A = 600 * 65536, parameter int FY_A = 600 * 65536,
  parameter int CX_A = 320 * 65536, parameter int CY_A = 240 * 65536,
  parameter int FX_B = 600 * 65536, parameter int FY_B = 600 * 65536,
  parameter int CX_B = 320 * 65536, parameter int CY_B = 240 * 65536
) (
  input  logic        clk,
  input  logic        rst_n,
  // Avalon-MM slave (HPS to FPGA)
  input  logic [3:0]  avs_address,
  input  logic        avs_read,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  // Avalon-MM master (FPGA to HPS DDR)
  output logic [31:0] avm_address,
  output logic        avm_read,
  output logic [$clog2(BURST):0] avm_burstcount,
  input  logic        avm_waitrequest,
  input  logic [63:0] avm_readdata,
  input  logic        avm_readdatavalid
);
  localparam int N_BEATS = IMG_W * IMG_H / 8;
  localparam int LAW     = $clog2(CAL_PAIRS);
  localparam int LCW     = $clog2(CAL_PAIRS + 1);

  logic pipe_rst, prst_n;
  assign prst_n = rst_n && !pipe_rst;

  // ---------------- control ----------------
  logic        calibration_mode, calibrated;
  logic [7:0]  threshold;
  logic [15:0] area_min, area_max;
  logic        frame_start;
  logic [31:0] frame_base;
  logic        cent_done, cent_valid;
  pt_t         cent_x, cent_y;
  logic        pair_valid;
  pair_t       pair_px;
  logic        log_full, log_clear, pose_start, pose_done, pose_ok;
  logic [LCW-1:0] log_count;
  logic [1:0]  pose_sel;
  logic        tri_done;
  pt_t         tri_xyz [3];
  logic        cal_valid, run_valid, dropped;
  pair_t       norm_pair, route_pair;
  logic        norm_valid_a, norm_valid_b;

  control_asm #(.IMG_W(IMG_W), .IMG_H(IMG_H), .CAL_PAIRS(CAL_PAIRS)) u_ctrl (
    .clk, .rst_n,
    .avs_address, .avs_read, .avs_write, .avs_writedata, .avs_readdata,
    .pipe_rst, .calibration_mode, .calibrated, .threshold, .area_min, .area_max,
    .frame_start, .frame_base, .cent_done, .cent_valid, .cent_x, .cent_y,
    .pair_valid, .pair_px,
    .log_written(cal_valid), .log_full, .log_count, .log_clear,
    .pose_start, .pose_done, .pose_ok, .pose_sel,
    .tri_done, .tri_x(tri_xyz[0]), .tri_y(tri_xyz[1]), .tri_z(tri_xyz[2]));

  // ---------------- image path ----------------
  logic                     px_valid;
  logic [63:0]              px_data;
  logic [$clog2(FIFO_DEPTH):0] fifo_count;
  logic                     f_valid, f_ready, f_wready;
  logic [63:0]              f_data;
  logic                     rd_busy, rd_done, cent_busy;
  logic [31:0]              cent_area;

  ddr_reader #(.BURST(BURST), .FIFO_DEPTH(FIFO_DEPTH), .BEAT_W($clog2(N_BEATS + 1))) u_reader (
    .clk, .rst_n(prst_n), .start(frame_start), .base_addr(frame_base),
    .n_beats($clog2(N_BEATS + 1)'(N_BEATS)), .fifo_count,
    .busy(rd_busy), .done(rd_done),
    .avm_address, .avm_read, .avm_burstcount, .avm_waitrequest,
    .avm_readdata, .avm_readdatavalid, .px_valid, .px_data);

  pixel_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n(prst_n), .clr(frame_start),
    .wr_valid(px_valid), .wr_ready(f_wready), .wr_data(px_data),
    .rd_valid(f_valid), .rd_ready(f_ready), .rd_data(f_data), .count(fifo_count));

  centroid #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_cent (
    .clk, .rst_n(prst_n), .start(frame_start), .threshold, .area_min, .area_max,
    .px_valid(f_valid), .px_ready(f_ready), .px_data(f_data),
    .busy(cent_busy), .done(cent_done), .valid(cent_valid), .area(cent_area),
    .cx(cent_x), .cy(cent_y));

  // ---------------- normalization and mode multiplexer ----------------
  normalize #(.FX(FX_A), .FY(FY_A), .CX(CX_A), .CY(CY_A)) u_norm_a (
    .clk, .rst_n(prst_n), .in_valid(pair_valid), .u(pair_px.xa), .v(pair_px.ya),
    .out_valid(norm_valid_a), .xn(norm_pair.xa), .yn(norm_pair.ya));
  normalize #(.FX(FX_B), .FY(FY_B), .CX(CX_B), .CY(CY_B)) u_norm_b (
    .clk, .rst_n(prst_n), .in_valid(pair_valid), .u(pair_px.xb), .v(pair_px.yb),
    .out_valid(norm_valid_b), .xn(norm_pair.xb), .yn(norm_pair.yb));

  pair_router u_router (
    .in_valid(norm_valid_a && norm_valid_b), .in_pair(norm_pair),
    .calibration_mode, .calibrated,
    .cal_valid, .run_valid, .dropped, .out_pair(route_pair));

  // ---------------- calibration path ----------------
  logic [LAW-1:0] log_raddr;
  pair_t          log_rdata, log_last;

  calib_log #(.DEPTH(CAL_PAIRS)) u_log (
    .clk, .rst_n(prst_n), .clr(log_clear), .wr(cal_valid), .wr_pair(route_pair),
    .rd_addr(log_raddr), .rd_data(log_rdata), .last(log_last),
    .count(log_count), .full(log_full));

  logic ess_busy, ess_done;
  un_t  e_raw [3][3];
  acc_t min_eval;
  ess_est #(.MAX_PAIRS(CAL_PAIRS)) u_ess (
    .clk, .rst_n(prst_n), .start(pose_start), .n_pairs(log_count),
    .rd_addr(log_raddr), .rd_data(log_rdata),
    .busy(ess_busy), .done(ess_done), .e_raw(e_raw), .min_eval(min_eval));

  logic pd_busy, pd_done;
  un_t  e_fix [3][3];
  un_t  cand_r [4][3][3];
  un_t  cand_t [4][3];
  pose_decomp u_pose (
    .clk, .rst_n(prst_n), .start(ess_done), .e_raw(e_raw),
    .busy(pd_busy), .done(pd_done), .e_fix(e_fix), .cand_r(cand_r), .cand_t(cand_t));

  logic chir_busy;
  un_t  p1 [3][4], p2 [3][4];
  chirality u_chir (
    .clk, .rst_n(prst_n), .start(pd_done), .cand_r(cand_r), .cand_t(cand_t),
    .x1(log_last.xa), .y1(log_last.ya), .x2(log_last.xb), .y2(log_last.yb),
    .busy(chir_busy), .done(pose_done), .ok(pose_ok), .sel(pose_sel),
    .p1(p1), .p2(p2));

  // ---------------- runtime path ----------------
  logic tri_busy;
  un_t  tri_xh [4];
  triangulate u_tri (
    .clk, .rst_n(prst_n), .start(run_valid), .p1(p1), .p2(p2),
    .x1(route_pair.xa), .y1(route_pair.ya), .x2(route_pair.xb), .y2(route_pair.yb),
    .busy(tri_busy), .done(tri_done), .xh(tri_xh), .xyz(tri_xyz));
endmodule
