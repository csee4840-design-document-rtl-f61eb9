// jacobi_svd3: two-sided Jacobi singular value decomposition of a 3x3 matrix.
//
// A working copy of A is rotated towards diagonal form while U and V
// accumulate the rotations, keeping A_in = U * A * V^T at every step. Each
// sweep applies a step to the pairs (0,1), (0,2), (1,2). A step first makes
// columns p and q of A orthogonal: with alpha = sum A[k][p]^2,
// beta = sum A[k][q]^2, gamma = sum A[k][p]A[k][q], jacobi_rot gives (c, s),
// and columns p, q of A and of V are rotated. It then does the same on rows
// p and q of A, with the sums taken along the rows, rotating columns p, q of
// U. A rotation is skipped when |gamma| <= EPS. After SWEEPS sweeps the
// rotated matrix has one significant entry per row and column, but the
// alternating row and column rotations can leave it as a signed permutation
// (for example anti-diagonal) rather than diagonal. A final ordering step
// therefore takes, column by column in order of decreasing size, the largest
// entry in a row not yet used; that entry's magnitude is a singular value, the
// column of V is kept and the matching column of U is taken with the entry's
// sign. The outputs are singular values sorted in decreasing order with U, V
// orthogonal and A_in = U diag(sig) V^T. The rotation steps follow the
// design's pseudocode; the sweep count, EPS and the ordering step are this
// implementation's choices.
//
// Formats: A, U, V are Q2.30 (the input must have entries well below 2 in
// magnitude; a unit-norm E_raw does). The sums are Q4.60 in 64 bits.
// Timing: each step takes two rotations of about 330 clocks plus 2 x 3 update
// clocks; about 6 * SWEEPS rotations in all. `done` pulses once; outputs hold.
module jacobi_svd3
  import stereo_pkg::*;
#(
  parameter int   SWEEPS = 8,
  parameter acc_t EPS    = 64'sd1048576
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  un_t  a_in [3][3],
  output logic busy,
  output logic done,
  output un_t  u [3][3],
  output un_t  sig [3],    // singular values, decreasing, non-negative
  output un_t  v [3][3]
);
  typedef enum logic [2:0] { S_IDLE, S_G1, S_W1, S_U1, S_G2, S_W2, S_U2, S_FIN } st_t;
  st_t st;

  un_t A [3][3];
  logic [1:0] p, q, k;
  logic [$clog2(SWEEPS+1)-1:0] sweep;
  logic row_phase;

  acc_t alpha, beta, gamma;
  always_comb begin
    alpha = '0; beta = '0; gamma = '0;
    for (int i = 0; i < 3; i++) begin
      if (row_phase) begin
        alpha += 64'(A[p][i]) * 64'(A[p][i]);
        beta  += 64'(A[q][i]) * 64'(A[q][i]);
        gamma += 64'(A[p][i]) * 64'(A[q][i]);
      end else begin
        alpha += 64'(A[i][p]) * 64'(A[i][p]);
        beta  += 64'(A[i][q]) * 64'(A[i][q]);
        gamma += 64'(A[i][p]) * 64'(A[i][q]);
      end
    end
  end

  logic rot_start, rot_done, rot_busy, rot_skip;
  un_t  rc, rs;
  jacobi_rot #(.EPS(EPS)) u_rot (
    .clk, .rst_n, .start(rot_start), .a_pp(alpha), .a_qq(beta), .a_pq(gamma),
    .busy(rot_busy), .done(rot_done), .skipped(rot_skip), .c(rc), .s(rs));

  function automatic un_t qmul2(input un_t a, input un_t ca, input un_t b, input un_t cb);
    logic signed [63:0] pr;
    pr = 64'(a) * 64'(ca) + 64'(b) * 64'(cb);
    return un_t'(pr >>> UN_FRAC);
  endfunction

  function automatic un_t abs_un(input un_t x); return x[31] ? -x : x; endfunction

  // Ordering step: columns by decreasing largest magnitude, then for each
  // the row of its largest entry among the rows not yet taken.
  logic [1:0] ord_c [3];
  logic [1:0] ord_r [3];
  always_comb begin
    un_t  cmax [3];
    logic [1:0] t;
    logic [2:0] used;
    un_t  best;
    t = '0;
    used = '0;
    best = '0;
    for (int n = 0; n < 3; n++) ord_r[n] = '0;
    for (int j = 0; j < 3; j++) begin
      cmax[j] = '0;
      for (int i = 0; i < 3; i++)
        if (abs_un(A[i][j]) > cmax[j]) cmax[j] = abs_un(A[i][j]);
    end
    ord_c[0] = 2'd0; ord_c[1] = 2'd1; ord_c[2] = 2'd2;
    if (cmax[ord_c[1]] > cmax[ord_c[0]]) begin t = ord_c[0]; ord_c[0] = ord_c[1]; ord_c[1] = t; end
    if (cmax[ord_c[2]] > cmax[ord_c[1]]) begin t = ord_c[1]; ord_c[1] = ord_c[2]; ord_c[2] = t; end
    if (cmax[ord_c[1]] > cmax[ord_c[0]]) begin t = ord_c[0]; ord_c[0] = ord_c[1]; ord_c[1] = t; end
    for (int n = 0; n < 3; n++) begin
      best = -32'sd1;
      for (int i = 0; i < 3; i++)
        if (!used[i] && abs_un(A[i][ord_c[n]]) > best) begin
          best = abs_un(A[i][ord_c[n]]);
          ord_r[n] = 2'(i);
        end
      used[ord_r[n]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; busy <= 1'b0; done <= 1'b0; rot_start <= 1'b0;
      p <= '0; q <= 2'd1; k <= '0; sweep <= '0; row_phase <= 1'b0;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) begin
          A[i][j] <= '0; u[i][j] <= '0; v[i][j] <= '0;
          if (j == 0) sig[i] <= '0;
        end
    end else begin
      done <= 1'b0;
      rot_start <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          for (int i = 0; i < 3; i++)
            for (int j = 0; j < 3; j++) begin
              A[i][j] <= a_in[i][j];
              u[i][j] <= (i == j) ? UN_ONE : '0;
              v[i][j] <= (i == j) ? UN_ONE : '0;
            end
          p <= '0; q <= 2'd1; sweep <= '0; row_phase <= 1'b0; busy <= 1'b1;
          st <= S_G1;
        end
        S_G1: begin rot_start <= 1'b1; st <= S_W1; end
        S_W1: if (rot_done) begin
          k <= '0;
          st <= rot_skip ? S_G2 : S_U1;
          if (rot_skip) row_phase <= 1'b1;
        end
        S_U1: begin
          A[k][p] <= qmul2(A[k][p], rc, A[k][q], -rs);
          A[k][q] <= qmul2(A[k][p], rs, A[k][q], rc);
          v[k][p] <= qmul2(v[k][p], rc, v[k][q], -rs);
          v[k][q] <= qmul2(v[k][p], rs, v[k][q], rc);
          k <= k + 1'b1;
          if (k == 2'd2) begin row_phase <= 1'b1; st <= S_G2; end
        end
        S_G2: begin rot_start <= 1'b1; st <= S_W2; end
        S_W2: if (rot_done) begin
          k <= '0;
          if (!rot_skip) st <= S_U2;
          else begin
            k <= 2'd2;            // nothing to rotate: go straight to advance
            st <= S_U2;
          end
        end
        S_U2: begin
          if (!rot_skip) begin
            A[p][k] <= qmul2(A[p][k], rc, A[q][k], -rs);
            A[q][k] <= qmul2(A[p][k], rs, A[q][k], rc);
            u[k][p] <= qmul2(u[k][p], rc, u[k][q], -rs);
            u[k][q] <= qmul2(u[k][p], rs, u[k][q], rc);
          end
          k <= k + 1'b1;
          if (k == 2'd2) begin
            row_phase <= 1'b0;
            st <= S_G1;
            if (p == 2'd0 && q == 2'd1) q <= 2'd2;
            else if (p == 2'd0) begin p <= 2'd1; q <= 2'd2; end
            else begin
              p <= 2'd0; q <= 2'd1;
              if (sweep == ($clog2(SWEEPS+1))'(SWEEPS-1)) st <= S_FIN;
              else sweep <= sweep + 1'b1;
            end
          end
        end
        S_FIN: begin
          for (int n = 0; n < 3; n++) begin
            sig[n] <= abs_un(A[ord_r[n]][ord_c[n]]);
            for (int i = 0; i < 3; i++) begin
              u[i][n] <= A[ord_r[n]][ord_c[n]][31] ? -u[i][ord_r[n]] : u[i][ord_r[n]];
              v[i][n] <= v[i][ord_c[n]];
            end
          end
          busy <= 1'b0;
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
