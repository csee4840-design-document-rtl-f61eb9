// control_asm: Avalon-MM register agent and frame-level control state machine.
//
// Register file: sixteen 32-bit registers at word offsets 0..15 (byte offsets
// 0x00..0x3C): CONTROL, STATUS, MODE, FRAME_A0/A1/B0/B1_ADDR, ACTIVE_BUF,
// THRESHOLD, AREA_LIMS, RESULT_X/Y/Z, DEBUG0..2, with the bit fields of the
// design's register map. CONTROL bits are commands that act on the write and
// read back as zero: start (0), reset (1), clear_done (2), clear_error (3),
// clear_result (4). STATUS: busy (0), done (1), calibrated (2),
// result_valid (3), error (4), frame_ready (5). STATUS and RESULT are
// read-only. The slave has a fixed read latency of one clock and never stalls.
// DEBUG0/1 hold the integer parts of the latest camera A/B centroid,
// {y[15:0], x[15:0]}; DEBUG2 holds {pairs logged, error code, 4'b0, algorithm
// select, chosen pose candidate, FSM state}.
//
// Control sequence after `start`: read the active camera A buffer through the
// DDR reader into the threshold/centroid stage, then the camera B buffer;
// if both frames give a centroid, set frame_ready and emit the pixel pair
// (pair_valid). In calibration mode the normalized pair is logged; when the
// log is full, pose estimation is started (pose_start) and its outcome sets
// `calibrated` (or `error`). In runtime mode with valid projection matrices
// the pair is triangulated and RESULT_X/Y/Z are written with result_valid set.
// Every operation ends with done set and busy cleared. A rejected frame (area
// outside AREA_LIMS) or a runtime request before calibration sets error.
// CONTROL.reset produces a one-clock pipeline reset (pipe_rst) and returns
// the state machine and status flags to idle; configuration registers keep
// their values. The register map and flags follow the design; the ordering of
// the two camera reads, the flag rules and DEBUG layouts are this
// implementation's choices.
module control_asm
  import stereo_pkg::*;
#(
  parameter int IMG_W     = 640,
  parameter int IMG_H     = 480,
  parameter int CAL_PAIRS = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  // Avalon-MM slave
  input  logic [3:0]  avs_address,
  input  logic        avs_read,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  // pipeline reset and mode
  output logic        pipe_rst,
  output logic        calibration_mode,
  output logic        calibrated,
  output logic [7:0]  threshold,
  output logic [15:0] area_min,
  output logic [15:0] area_max,
  // DDR reader and centroid stage
  output logic        frame_start,
  output logic [31:0] frame_base,
  input  logic        cent_done,
  input  logic        cent_valid,
  input  pt_t         cent_x,
  input  pt_t         cent_y,
  // centroid pair to normalization and routing
  output logic        pair_valid,
  output pair_t       pair_px,
  // calibration path
  input  logic        log_written,
  input  logic        log_full,
  input  logic [$clog2(CAL_PAIRS+1)-1:0] log_count,
  output logic        log_clear,
  output logic        pose_start,
  input  logic        pose_done,
  input  logic        pose_ok,
  input  logic [1:0]  pose_sel,
  // runtime path
  input  logic        tri_done,
  input  pt_t         tri_x,
  input  pt_t         tri_y,
  input  pt_t         tri_z
);
  typedef enum logic [3:0] {
    C_IDLE, C_RD_A, C_WAIT_A, C_RD_B, C_WAIT_B, C_PAIR, C_LOG, C_LOGCHK, C_POSE, C_TRI, C_FINISH
  } cst_t;
  cst_t st;

  logic [31:0] frame_addr [4];
  logic [1:0]  active_buf;
  logic [2:0]  mode_r;
  logic        st_busy, st_done, st_result_valid, st_error, st_frame_ready;
  pt_t         res [3];
  pt_t         ca_x, ca_y, cb_x, cb_y;
  err_t        err_code;
  logic [1:0]  sel_r;

  assign calibration_mode = mode_r[0];

  logic wr_ctrl;
  assign wr_ctrl = avs_write && (avs_address == REG_CONTROL);

  // Register writes and read-back.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) frame_addr[i] <= '0;
      active_buf <= '0; mode_r <= '0; threshold <= '0;
      area_min <= '0; area_max <= 16'hFFFF; avs_readdata <= '0;
    end else begin
      if (avs_write) begin
        unique case (avs_address)
          REG_MODE:       mode_r       <= avs_writedata[2:0];
          REG_FRAME_A0:   frame_addr[0] <= avs_writedata;
          REG_FRAME_A1:   frame_addr[1] <= avs_writedata;
          REG_FRAME_B0:   frame_addr[2] <= avs_writedata;
          REG_FRAME_B1:   frame_addr[3] <= avs_writedata;
          REG_ACTIVE_BUF: active_buf   <= avs_writedata[1:0];
          REG_THRESHOLD:  threshold    <= avs_writedata[7:0];
          REG_AREA_LIMS:  begin area_max <= avs_writedata[31:16]; area_min <= avs_writedata[15:0]; end
          default: ;
        endcase
      end
      if (avs_read) begin
        unique case (avs_address)
          REG_CONTROL:    avs_readdata <= '0;
          REG_STATUS:     avs_readdata <= {26'h0, st_frame_ready, st_error, st_result_valid,
                                           calibrated, st_done, st_busy};
          REG_MODE:       avs_readdata <= {29'h0, mode_r};
          REG_FRAME_A0:   avs_readdata <= frame_addr[0];
          REG_FRAME_A1:   avs_readdata <= frame_addr[1];
          REG_FRAME_B0:   avs_readdata <= frame_addr[2];
          REG_FRAME_B1:   avs_readdata <= frame_addr[3];
          REG_ACTIVE_BUF: avs_readdata <= {30'h0, active_buf};
          REG_THRESHOLD:  avs_readdata <= {24'h0, threshold};
          REG_AREA_LIMS:  avs_readdata <= {area_max, area_min};
          REG_RESULT_X:   avs_readdata <= res[0];
          REG_RESULT_Y:   avs_readdata <= res[1];
          REG_RESULT_Z:   avs_readdata <= res[2];
          REG_DEBUG0:     avs_readdata <= {ca_y[31:16], ca_x[31:16]};
          REG_DEBUG1:     avs_readdata <= {cb_y[31:16], cb_x[31:16]};
          REG_DEBUG2:     avs_readdata <= {8'(log_count), err_code, 4'h0, mode_r[2:1], sel_r, 4'h0, st};
          default:        avs_readdata <= '0;
        endcase
      end
    end
  end

  // Control state machine and status flags.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; pipe_rst <= 1'b0;
      st_busy <= 1'b0; st_done <= 1'b0; st_result_valid <= 1'b0; st_error <= 1'b0;
      st_frame_ready <= 1'b0; calibrated <= 1'b0; err_code <= ERR_NONE; sel_r <= '0;
      frame_start <= 1'b0; frame_base <= '0; pair_valid <= 1'b0; pair_px <= '0;
      log_clear <= 1'b0; pose_start <= 1'b0;
      for (int i = 0; i < 3; i++) res[i] <= '0;
      ca_x <= '0; ca_y <= '0; cb_x <= '0; cb_y <= '0;
    end else begin
      pipe_rst    <= 1'b0;
      frame_start <= 1'b0;
      pair_valid  <= 1'b0;
      log_clear   <= 1'b0;
      pose_start  <= 1'b0;
      if (wr_ctrl && avs_writedata[2]) st_done <= 1'b0;
      if (wr_ctrl && avs_writedata[3]) begin st_error <= 1'b0; err_code <= ERR_NONE; end
      if (wr_ctrl && avs_writedata[4]) st_result_valid <= 1'b0;

      if (wr_ctrl && avs_writedata[1]) begin
        pipe_rst <= 1'b1;
        st <= C_IDLE;
        st_busy <= 1'b0; st_done <= 1'b0; st_result_valid <= 1'b0; st_error <= 1'b0;
        st_frame_ready <= 1'b0; calibrated <= 1'b0; err_code <= ERR_NONE;
      end else begin
        unique case (st)
          C_IDLE: if (wr_ctrl && avs_writedata[0]) begin
            st_busy <= 1'b1; st_done <= 1'b0; st_frame_ready <= 1'b0;
            st <= C_RD_A;
          end
          C_RD_A: begin
            frame_base  <= frame_addr[{1'b0, active_buf[0]}];
            frame_start <= 1'b1;
            st <= C_WAIT_A;
          end
          C_WAIT_A: if (cent_done) begin
            if (cent_valid) begin ca_x <= cent_x; ca_y <= cent_y; st <= C_RD_B; end
            else begin st_error <= 1'b1; err_code <= ERR_AREA_A; st <= C_FINISH; end
          end
          C_RD_B: begin
            frame_base  <= frame_addr[{1'b1, active_buf[1]}];
            frame_start <= 1'b1;
            st <= C_WAIT_B;
          end
          C_WAIT_B: if (cent_done) begin
            if (cent_valid) begin cb_x <= cent_x; cb_y <= cent_y; st <= C_PAIR; end
            else begin st_error <= 1'b1; err_code <= ERR_AREA_B; st <= C_FINISH; end
          end
          C_PAIR: begin
            st_frame_ready <= 1'b1;
            if (!calibration_mode && !calibrated) begin
              st_error <= 1'b1; err_code <= ERR_NOT_CAL; st <= C_FINISH;
            end else begin
              pair_valid <= 1'b1;
              pair_px    <= '{xa: ca_x, ya: ca_y, xb: cb_x, yb: cb_y};
              st <= calibration_mode ? C_LOG : C_TRI;
            end
          end
          C_LOG: if (log_written) st <= C_LOGCHK;
          C_LOGCHK: begin
            if (log_full) begin pose_start <= 1'b1; st <= C_POSE; end
            else st <= C_FINISH;
          end
          C_POSE: if (pose_done) begin
            calibrated <= pose_ok;
            sel_r <= pose_sel;
            log_clear <= 1'b1;
            if (!pose_ok) begin st_error <= 1'b1; err_code <= ERR_CHIRALITY; end
            st <= C_FINISH;
          end
          C_TRI: if (tri_done) begin
            res[0] <= tri_x; res[1] <= tri_y; res[2] <= tri_z;
            st_result_valid <= 1'b1;
            st <= C_FINISH;
          end
          C_FINISH: begin
            st_busy <= 1'b0;
            st_done <= 1'b1;
            st <= C_IDLE;
          end
          default: st <= C_IDLE;
        endcase
      end
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    frame_start |-> st_busy);
endmodule
