// triangulate: linear (DLT) triangulation of one point from two views.
//
// Given projection matrices P1, P2 (3x4, Q2.30) and the image points
// (x1, y1), (x2, y2) (Q16.16, normalized coordinates), the block builds
//     A = [ x1 P1[2] - P1[0] ;  y1 P1[2] - P1[1] ;
//           x2 P2[2] - P2[0] ;  y2 P2[2] - P2[1] ]      (4x4, Q8.24)
// forms the symmetric 4x4 matrix A^T A (Q16.48, one entry per clock), and
// takes the eigenvector of its smallest eigenvalue with the Jacobi
// eigensolver. That vector equals the right singular vector of A for the
// smallest singular value, i.e. the homogeneous point X = (X, Y, Z, W)
// (unit length, Q2.30, output xh). Finally it dehomogenizes with one
// sequential divider: xyz = (X/W, Y/W, Z/W) in Q16.16, saturating at
// +-32768 when |W| is too small. Using the eigenvector of A^T A rather than an
// SVD of A, and the number formats, are this implementation's choices.
//
// Timing: 4 + 16 clocks to build A^T A, the 4x4 eigensolver (a few thousand
// clocks) and 3 x 50 clocks of division. `done` pulses once; outputs hold.
module triangulate
  import stereo_pkg::*;
#(
  parameter int SWEEPS = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  un_t  p1 [3][4],
  input  un_t  p2 [3][4],
  input  pt_t  x1,
  input  pt_t  y1,
  input  pt_t  x2,
  input  pt_t  y2,
  output logic busy,
  output logic done,
  output un_t  xh [4],
  output pt_t  xyz [3]
);
  typedef enum logic [2:0] { S_IDLE, S_A, S_ATA, S_EIG, S_WAIT, S_DIV, S_DWAIT } st_t;
  st_t st;

  logic signed [31:0] A [4][4];
  acc_t ata [4][4];
  logic [1:0] ri, rj;
  logic [1:0] di;

  // u * P / 2^22 : Q16.16 x Q2.30 -> Q8.24;   P / 2^6 : Q2.30 -> Q8.24
  function automatic logic signed [31:0] row_term(input pt_t u, input un_t pz, input un_t pr);
    logic signed [63:0] pr2;
    pr2 = 64'(u) * 64'(pz);
    return 32'(pr2 >>> 22) - (pr >>> 6);
  endfunction

  logic eig_start, eig_busy, eig_done;
  un_t  evec [4];
  acc_t eval;
  jacobi_eig #(.N(4), .SWEEPS(SWEEPS)) u_eig (
    .clk, .rst_n, .start(eig_start), .m_in(ata),
    .busy(eig_busy), .done(eig_done), .evec(evec), .eval(eval));

  logic        dv_start, dv_busy, dv_done;
  logic [47:0] dv_num, dv_quo;
  logic [31:0] dv_den, dv_rem;
  udiv_seq #(.NW(48), .DW(32)) u_div (
    .clk, .rst_n, .start(dv_start), .num(dv_num), .den(dv_den),
    .busy(dv_busy), .done(dv_done), .quo(dv_quo), .rem(dv_rem));

  function automatic logic [31:0] mag(input un_t x); return x[31] ? 32'(-x) : 32'(x); endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; busy <= 1'b0; done <= 1'b0; eig_start <= 1'b0; dv_start <= 1'b0;
      ri <= '0; rj <= '0; di <= '0; dv_num <= '0; dv_den <= '0;
      for (int a = 0; a < 4; a++) begin
        xh[a] <= '0;
        for (int b = 0; b < 4; b++) begin A[a][b] <= '0; ata[a][b] <= '0; end
      end
      for (int a = 0; a < 3; a++) xyz[a] <= '0;
    end else begin
      done <= 1'b0;
      eig_start <= 1'b0;
      dv_start <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin busy <= 1'b1; st <= S_A; end
        S_A: begin
          for (int c = 0; c < 4; c++) begin
            A[0][c] <= row_term(x1, p1[2][c], p1[0][c]);
            A[1][c] <= row_term(y1, p1[2][c], p1[1][c]);
            A[2][c] <= row_term(x2, p2[2][c], p2[0][c]);
            A[3][c] <= row_term(y2, p2[2][c], p2[1][c]);
          end
          ri <= '0; rj <= '0;
          st <= S_ATA;
        end
        S_ATA: begin
          ata[ri][rj] <= 64'(A[0][ri]) * 64'(A[0][rj]) + 64'(A[1][ri]) * 64'(A[1][rj])
                       + 64'(A[2][ri]) * 64'(A[2][rj]) + 64'(A[3][ri]) * 64'(A[3][rj]);
          rj <= rj + 1'b1;
          if (rj == 2'd3) begin
            ri <= ri + 1'b1;
            if (ri == 2'd3) st <= S_EIG;
          end
        end
        S_EIG: begin eig_start <= 1'b1; st <= S_WAIT; end
        S_WAIT: if (eig_done) begin
          for (int a = 0; a < 4; a++) xh[a] <= evec[a];
          di <= '0;
          st <= S_DIV;
        end
        S_DIV: begin
          dv_num <= {mag(xh[di]), 16'h0};
          dv_den <= mag(xh[3]);
          dv_start <= 1'b1;
          st <= S_DWAIT;
        end
        S_DWAIT: if (dv_done) begin
          if (dv_quo > 48'h7FFF_FFFF || xh[3] == 0)
            xyz[di] <= (xh[di][31] ^ xh[3][31]) ? -32'sh7FFF_FFFF : 32'sh7FFF_FFFF;
          else
            xyz[di] <= (xh[di][31] ^ xh[3][31]) ? -pt_t'(dv_quo[31:0]) : pt_t'(dv_quo[31:0]);
          if (di == 2'd2) begin
            busy <= 1'b0; done <= 1'b1; st <= S_IDLE;
          end else begin
            di <= di + 1'b1;
            st <= S_DIV;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
