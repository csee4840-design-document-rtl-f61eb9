// jacobi_eig: cyclic Jacobi eigensolver for a small symmetric N x N matrix.
//
// On `start` the full matrix `m_in` is loaded into M and the eigenvector
// accumulator Q is set to the identity. Each sweep visits every pair
// (p, q), p < q, in row order. For a pair whose coupling |M[p][q]| exceeds
// EPS, jacobi_rot supplies (c, s) and three sequential update passes follow,
// one element pair per clock:
//   columns : M[k][p], M[k][q] <- c*M[k][p] - s*M[k][q], s*M[k][p] + c*M[k][q]
//   rows    : the same on M[p][k], M[q][k]
//   Q       : the same on Q[k][p], Q[k][q]
// After SWEEPS sweeps the diagonal of M holds the eigenvalues and the columns
// of Q the eigenvectors; the block returns the eigenvector of the smallest
// (most negative) eigenvalue and that eigenvalue. This follows the rotation
// schedule and update order of the design's eigensolver; the fixed sweep
// count, the EPS value and the single-element-per-clock datapath are this
// implementation's choices.
//
// Formats: M and the returned eigenvalue are signed 64-bit in the caller's
// scale (Q32.32 for A^T A); Q and the eigenvector are Q2.30 (unit length).
// Timing: roughly SWEEPS * N(N-1)/2 * (330 + 3N) clocks; `done` pulses once and
// the outputs hold until the next `start`.
module jacobi_eig
  import stereo_pkg::*;
#(
  parameter int   N      = 9,
  parameter int   SWEEPS = 10,
  parameter acc_t EPS    = 64'sd16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  acc_t m_in [N][N],
  output logic busy,
  output logic done,
  output un_t  evec [N],
  output acc_t eval
);
  localparam int IW = $clog2(N);
  localparam int SW = $clog2(SWEEPS + 1);

  typedef enum logic [2:0] { S_IDLE, S_ROT, S_WAIT, S_COL, S_ROW, S_Q, S_PICK } st_t;
  st_t st;

  acc_t M [N][N];
  un_t  Q [N][N];
  logic [IW-1:0] p, q, k;
  logic [SW-1:0] sweep;

  logic rot_start, rot_done, rot_busy, rot_skip;
  un_t  rc, rs;

  jacobi_rot #(.EPS(EPS)) u_rot (
    .clk, .rst_n, .start(rot_start),
    .a_pp(M[p][p]), .a_qq(M[q][q]), .a_pq(M[p][q]),
    .busy(rot_busy), .done(rot_done), .skipped(rot_skip), .c(rc), .s(rs));

  // 64 x 32 rotation product, scaled back by 2^30.
  function automatic acc_t rmul2(input acc_t a, input un_t ca, input acc_t b, input un_t cb);
    logic signed [95:0] pr;
    pr = 96'(a) * 96'(ca) + 96'(b) * 96'(cb);
    return acc_t'(pr >>> UN_FRAC);
  endfunction

  function automatic un_t qmul2(input un_t a, input un_t ca, input un_t b, input un_t cb);
    logic signed [63:0] pr;
    pr = 64'(a) * 64'(ca) + 64'(b) * 64'(cb);
    return un_t'(pr >>> UN_FRAC);
  endfunction

  // Index of the smallest diagonal entry.
  logic [IW-1:0] min_i;
  always_comb begin
    min_i = '0;
    for (int i = 1; i < N; i++)
      if (M[i][i] < M[min_i][min_i]) min_i = IW'(i);
  end

  logic last_pair;
  assign last_pair = (p == IW'(N-2)) && (q == IW'(N-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; busy <= 1'b0; done <= 1'b0; rot_start <= 1'b0;
      p <= '0; q <= '0; k <= '0; sweep <= '0; eval <= '0;
      for (int i = 0; i < N; i++) begin
        evec[i] <= '0;
        for (int j = 0; j < N; j++) begin
          M[i][j] <= '0;
          Q[i][j] <= '0;
        end
      end
    end else begin
      done      <= 1'b0;
      rot_start <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          for (int i = 0; i < N; i++)
            for (int j = 0; j < N; j++) begin
              M[i][j] <= m_in[i][j];
              Q[i][j] <= (i == j) ? UN_ONE : '0;
            end
          p <= '0; q <= IW'(1); sweep <= '0; busy <= 1'b1;
          st <= S_ROT;
        end
        S_ROT: begin
          rot_start <= 1'b1;
          st <= S_WAIT;
        end
        S_WAIT: if (rot_done) begin
          k <= '0;
          if (rot_skip) st <= S_Q;    // identity rotation: only advance
          else          st <= S_COL;
        end
        S_COL: begin
          M[k][p] <= rmul2(M[k][p], rc, M[k][q], -rs);
          M[k][q] <= rmul2(M[k][p], rs, M[k][q], rc);
          k <= k + 1'b1;
          if (k == IW'(N-1)) begin k <= '0; st <= S_ROW; end
        end
        S_ROW: begin
          M[p][k] <= rmul2(M[p][k], rc, M[q][k], -rs);
          M[q][k] <= rmul2(M[p][k], rs, M[q][k], rc);
          k <= k + 1'b1;
          if (k == IW'(N-1)) begin k <= '0; st <= S_Q; end
        end
        S_Q: begin
          if (!rot_skip) begin
            Q[k][p] <= qmul2(Q[k][p], rc, Q[k][q], -rs);
            Q[k][q] <= qmul2(Q[k][p], rs, Q[k][q], rc);
          end
          k <= k + 1'b1;
          if (k == IW'(N-1) || rot_skip) begin
            k <= '0;
            if (last_pair) begin
              p <= '0; q <= IW'(1);
              if (sweep == SW'(SWEEPS-1)) st <= S_PICK;
              else begin sweep <= sweep + 1'b1; st <= S_ROT; end
            end else begin
              if (q == IW'(N-1)) begin p <= p + 1'b1; q <= p + IW'(2); end
              else q <= q + 1'b1;
              st <= S_ROT;
            end
          end
        end
        S_PICK: begin
          for (int i = 0; i < N; i++) evec[i] <= Q[i][min_i];
          eval <= M[min_i][min_i];
          busy <= 1'b0;
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
