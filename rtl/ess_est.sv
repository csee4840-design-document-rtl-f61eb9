// ess_est: essential matrix estimation by the eight-point method.
//
// After `start` the block reads the n_pairs logged correspondences one by one
// from the calibration log (rd_addr / rd_data, data valid one clock after the
// address). For each normalized pair (x1, y1) <-> (x2, y2) (camera A, camera B)
// it forms the row
//     a = [x2x1  x2y1  x2  y2x1  y2y1  y2  x1  y1  1]
// and adds the outer product a^T a into the upper triangle of A^T A (45 64-bit
// Q32.32 accumulators, one multiply-accumulate per clock). When every pair is
// in, the symmetric matrix is handed to the Jacobi eigensolver and the
// eigenvector of the smallest eigenvalue, which has unit length, is reshaped
// row-major into E_raw (Q2.30): E_raw[i][j] = e[3i + j].
// This follows the design's three-stage estimator. Coordinates are not further
// conditioned (Hartley scaling) because they are already normalized camera
// coordinates; that, and the sequential single-MAC datapath, are this
// implementation's choices.
//
// Timing: 47 clocks per pair, then the eigensolver (tens of thousands of
// clocks). `done` pulses once; E_raw and min_eval hold until the next start.
module ess_est
  import stereo_pkg::*;
#(
  parameter int MAX_PAIRS = 32,
  parameter int SWEEPS    = 10
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic [$clog2(MAX_PAIRS+1)-1:0] n_pairs,
  output logic [$clog2(MAX_PAIRS)-1:0]   rd_addr,
  input  pair_t rd_data,
  output logic busy,
  output logic done,
  output un_t  e_raw [3][3],
  output acc_t min_eval
);
  localparam int AW = $clog2(MAX_PAIRS);
  localparam int CW = $clog2(MAX_PAIRS + 1);

  typedef enum logic [2:0] { S_IDLE, S_RD, S_ROW, S_MAC, S_EIG, S_WAIT } st_t;
  st_t st;

  acc_t tri_m [9][9];        // only entries with i <= j are used
  pt_t  a [9];
  logic [3:0] ti, tj;
  logic [CW-1:0] cnt;

  function automatic pt_t pmul(input pt_t x, input pt_t y);
    logic signed [63:0] pr;
    pr = 64'(x) * 64'(y);
    return pt_t'(pr >>> PT_FRAC);
  endfunction

  // Full symmetric matrix for the eigensolver.
  acc_t m_full [9][9];
  always_comb
    for (int i = 0; i < 9; i++)
      for (int j = 0; j < 9; j++)
        m_full[i][j] = (i <= j) ? tri_m[i][j] : tri_m[j][i];

  logic eig_start, eig_busy, eig_done;
  un_t  evec [9];
  acc_t eval;
  jacobi_eig #(.N(9), .SWEEPS(SWEEPS)) u_eig (
    .clk, .rst_n, .start(eig_start), .m_in(m_full),
    .busy(eig_busy), .done(eig_done), .evec(evec), .eval(eval));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; busy <= 1'b0; done <= 1'b0; eig_start <= 1'b0;
      rd_addr <= '0; cnt <= '0; ti <= '0; tj <= '0; min_eval <= '0;
      for (int i = 0; i < 9; i++) begin
        a[i] <= '0;
        for (int j = 0; j < 9; j++) tri_m[i][j] <= '0;
      end
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) e_raw[i][j] <= '0;
    end else begin
      done <= 1'b0;
      eig_start <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          for (int i = 0; i < 9; i++) for (int j = 0; j < 9; j++) tri_m[i][j] <= '0;
          rd_addr <= '0; cnt <= '0; busy <= 1'b1;
          st <= (n_pairs == 0) ? S_EIG : S_RD;
        end
        S_RD: st <= S_ROW;                 // log read latency
        S_ROW: begin
          a[0] <= pmul(rd_data.xb, rd_data.xa);
          a[1] <= pmul(rd_data.xb, rd_data.ya);
          a[2] <= rd_data.xb;
          a[3] <= pmul(rd_data.yb, rd_data.xa);
          a[4] <= pmul(rd_data.yb, rd_data.ya);
          a[5] <= rd_data.yb;
          a[6] <= rd_data.xa;
          a[7] <= rd_data.ya;
          a[8] <= PT_ONE;
          ti <= '0; tj <= '0;
          st <= S_MAC;
        end
        S_MAC: begin
          tri_m[ti][tj] <= tri_m[ti][tj] + 64'(a[ti]) * 64'(a[tj]);
          if (tj == 4'd8) begin
            if (ti == 4'd8) begin
              cnt <= cnt + 1'b1;
              if (cnt + 1'b1 == n_pairs) st <= S_EIG;
              else begin rd_addr <= rd_addr + 1'b1; st <= S_RD; end
            end else begin
              ti <= ti + 1'b1;
              tj <= ti + 1'b1;
            end
          end else tj <= tj + 1'b1;
        end
        S_EIG: begin eig_start <= 1'b1; st <= S_WAIT; end
        S_WAIT: if (eig_done) begin
          for (int i = 0; i < 3; i++)
            for (int j = 0; j < 3; j++) e_raw[i][j] <= evec[3*i + j];
          min_eval <= eval;
          busy <= 1'b0;
          done <= 1'b1;
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
