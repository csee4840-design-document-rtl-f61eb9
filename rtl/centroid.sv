// centroid: thresholding and centroid extraction for one grayscale frame.
//
// Pixels arrive as 64-bit beats, eight 8-bit pixels per beat in raster order,
// the pixel at the lowest address in bits 7:0. A pixel is foreground when its
// value is above `threshold`. For every beat the block counts the foreground
// pixels and adds their x and y coordinates to running 32-bit sums:
//     A = sum B(x,y),  Sx = sum x B(x,y),  Sy = sum y B(x,y).
// After IMG_W*IMG_H/8 beats the frame is complete: if area_min <= A <= area_max
// (and A > 0) the centroid (Sx/A, Sy/A) is computed by a sequential divider
// as Q16.16 pixel coordinates and `valid` is set; otherwise the frame is
// rejected (`valid` low). The moments, the running sums and the area range
// follow the design; the strict "above threshold" test, the pixel packing and
// the divider are this implementation's choices. The stream input is always
// ready, one beat per clock.
//
// Timing: one clock per beat, then 2 x 49 clocks of division; `done` pulses
// once, and cx, cy, area, valid hold until the next `start`.
module centroid
  import stereo_pkg::*;
#(
  parameter int IMG_W = 640,
  parameter int IMG_H = 480
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [7:0]  threshold,
  input  logic [15:0] area_min,
  input  logic [15:0] area_max,
  input  logic        px_valid,
  output logic        px_ready,
  input  logic [63:0] px_data,
  output logic        busy,
  output logic        done,
  output logic        valid,
  output logic [31:0] area,
  output pt_t         cx,
  output pt_t         cy
);
  localparam int XW = $clog2(IMG_W);
  localparam int YW = $clog2(IMG_H);

  typedef enum logic [2:0] { S_IDLE, S_ACC, S_DX, S_WX, S_DY, S_WY } st_t;
  st_t st;

  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic [31:0]   sum_x, sum_y;
  logic [3:0]    n_fg;
  logic [5:0]    ofs_fg;     // sum of in-beat offsets of foreground pixels
  logic          last_beat;

  always_comb begin
    n_fg = '0;
    ofs_fg = '0;
    for (int i = 0; i < 8; i++)
      if (px_data[8*i +: 8] > threshold) begin
        n_fg   = n_fg + 1'b1;
        ofs_fg = ofs_fg + 6'(i);
      end
  end

  assign px_ready  = (st == S_ACC);
  assign last_beat = (x == XW'(IMG_W - 8)) && (y == YW'(IMG_H - 1));

  logic        dv_start, dv_busy, dv_done;
  logic [47:0] dv_num, dv_quo;
  logic [31:0] dv_rem;
  udiv_seq #(.NW(48), .DW(32)) u_div (
    .clk, .rst_n, .start(dv_start), .num(dv_num), .den(area),
    .busy(dv_busy), .done(dv_done), .quo(dv_quo), .rem(dv_rem));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; busy <= 1'b0; done <= 1'b0; valid <= 1'b0;
      x <= '0; y <= '0; sum_x <= '0; sum_y <= '0; area <= '0;
      cx <= '0; cy <= '0; dv_start <= 1'b0; dv_num <= '0;
    end else begin
      done <= 1'b0;
      dv_start <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          x <= '0; y <= '0; sum_x <= '0; sum_y <= '0; area <= '0;
          valid <= 1'b0; busy <= 1'b1;
          st <= S_ACC;
        end
        S_ACC: if (px_valid) begin
          area  <= area + 32'(n_fg);
          sum_x <= sum_x + 32'(n_fg) * 32'(x) + 32'(ofs_fg);
          sum_y <= sum_y + 32'(n_fg) * 32'(y);
          if (x == XW'(IMG_W - 8)) begin
            x <= '0;
            y <= y + 1'b1;
          end else x <= x + XW'(8);
          if (last_beat) st <= S_DX;
        end
        S_DX: begin
          if (area == 0 || area < 32'(area_min) || area > 32'(area_max)) begin
            busy <= 1'b0; done <= 1'b1; st <= S_IDLE;
          end else begin
            dv_num <= {sum_x, 16'h0}; dv_start <= 1'b1; st <= S_WX;
          end
        end
        S_WX: if (dv_done) begin
          cx <= pt_t'(dv_quo[31:0]);
          dv_num <= {sum_y, 16'h0}; dv_start <= 1'b1; st <= S_WY;
        end
        S_WY: if (dv_done) begin
          cy <= pt_t'(dv_quo[31:0]);
          valid <= 1'b1; busy <= 1'b0; done <= 1'b1; st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
