// pose_decomp: pose decomposition of the raw essential matrix.
//
// On `start` E_raw goes through the 3x3 Jacobi SVD, E_raw = U diag(s0,s1,s2) V^T
// with s0 >= s1 >= s2 >= 0. The block then
//   * enforces the essential-matrix constraint: s = (s0 + s1) / 2 and
//     E = U diag(s, s, 0) V^T (output e_fix),
//   * forms R1 = U W V^T and R2 = U W^T V^T with W = [0 -1 0; 1 0 0; 0 0 1],
//     one matrix entry of all three products per clock (9 clocks),
//   * takes t = U(:,3),
//   * checks det(R1) (det(R2) is the same, det(W) = 1); if it is negative,
//     both R and t are negated so that the rotations are proper,
//   * outputs the four candidates (R1,+t), (R1,-t), (R2,+t), (R2,-t) as
//     cand_r[0..3], cand_t[0..3].
// This is the design's sequence; the ordering of singular values (needed so
// that the third column of U belongs to the zero singular value) is done by
// jacobi_svd3. All values are Q2.30. `done` pulses once after the SVD plus 11
// clocks; outputs hold until the next `start`.
module pose_decomp
  import stereo_pkg::*;
#(
  parameter int SWEEPS = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  un_t  e_raw [3][3],
  output logic busy,
  output logic done,
  output un_t  e_fix [3][3],
  output un_t  cand_r [4][3][3],
  output un_t  cand_t [4][3]
);
  typedef enum logic [2:0] { S_IDLE, S_SVD, S_MUL, S_DET, S_OUT } st_t;
  st_t st;

  logic svd_start, svd_busy, svd_done;
  un_t  u [3][3], v [3][3], sig [3];
  jacobi_svd3 #(.SWEEPS(SWEEPS)) u_svd (
    .clk, .rst_n, .start(svd_start), .a_in(e_raw),
    .busy(svd_busy), .done(svd_done), .u(u), .sig(sig), .v(v));

  un_t r1 [3][3], r2 [3][3];
  un_t s_avg;
  logic [1:0] i, j;
  logic det_neg;

  function automatic un_t m30(input un_t a, input un_t b);
    logic signed [63:0] pr;
    pr = 64'(a) * 64'(b);
    return un_t'(pr >>> UN_FRAC);
  endfunction

  // Products needed for entry (i, j).
  un_t p00, p11, p10, p01, p22;
  assign p00 = m30(u[i][0], v[j][0]);
  assign p11 = m30(u[i][1], v[j][1]);
  assign p10 = m30(u[i][1], v[j][0]);
  assign p01 = m30(u[i][0], v[j][1]);
  assign p22 = m30(u[i][2], v[j][2]);

  // det(R1) = R1[0] . (R1[1] x R1[2]); only its sign is used.
  logic signed [63:0] det1;
  always_comb begin
    un_t cx, cy, cz;
    cx = m30(r1[1][1], r1[2][2]) - m30(r1[1][2], r1[2][1]);
    cy = m30(r1[1][2], r1[2][0]) - m30(r1[1][0], r1[2][2]);
    cz = m30(r1[1][0], r1[2][1]) - m30(r1[1][1], r1[2][0]);
    det1 = 64'(r1[0][0]) * 64'(cx) + 64'(r1[0][1]) * 64'(cy) + 64'(r1[0][2]) * 64'(cz);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; busy <= 1'b0; done <= 1'b0; svd_start <= 1'b0;
      i <= '0; j <= '0; s_avg <= '0; det_neg <= 1'b0;
      for (int a = 0; a < 3; a++)
        for (int b = 0; b < 3; b++) begin
          r1[a][b] <= '0; r2[a][b] <= '0; e_fix[a][b] <= '0;
          for (int c = 0; c < 4; c++) cand_r[c][a][b] <= '0;
        end
      for (int c = 0; c < 4; c++) for (int a = 0; a < 3; a++) cand_t[c][a] <= '0;
    end else begin
      done <= 1'b0;
      svd_start <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          svd_start <= 1'b1; busy <= 1'b1; st <= S_SVD;
        end
        S_SVD: if (svd_done) begin
          s_avg <= un_t'((65'(sig[0]) + 65'(sig[1])) >>> 1);
          i <= '0; j <= '0;
          st <= S_MUL;
        end
        S_MUL: begin
          e_fix[i][j] <= m30(s_avg, p00 + p11);
          r1[i][j]    <= p10 - p01 + p22;
          r2[i][j]    <= p01 - p10 + p22;
          if (j == 2'd2) begin
            j <= '0;
            if (i == 2'd2) st <= S_DET;
            else i <= i + 1'b1;
          end else j <= j + 1'b1;
        end
        S_DET: begin
          det_neg <= det1[63];
          st <= S_OUT;
        end
        S_OUT: begin
          for (int a = 0; a < 3; a++) begin
            for (int b = 0; b < 3; b++) begin
              cand_r[0][a][b] <= det_neg ? -r1[a][b] : r1[a][b];
              cand_r[1][a][b] <= det_neg ? -r1[a][b] : r1[a][b];
              cand_r[2][a][b] <= det_neg ? -r2[a][b] : r2[a][b];
              cand_r[3][a][b] <= det_neg ? -r2[a][b] : r2[a][b];
            end
            cand_t[0][a] <= det_neg ? -u[a][2] :  u[a][2];
            cand_t[1][a] <= det_neg ?  u[a][2] : -u[a][2];
            cand_t[2][a] <= det_neg ? -u[a][2] :  u[a][2];
            cand_t[3][a] <= det_neg ?  u[a][2] : -u[a][2];
          end
          busy <= 1'b0;
          done <= 1'b1;
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
