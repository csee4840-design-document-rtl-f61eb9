// jacobi_rot: computes the plane rotation (c, s) of one Jacobi step.
//
// Given the two diagonal terms a_pp, a_qq and the coupling term a_pq of a 2x2
// symmetric problem (all signed, any common scale), it evaluates
//     tau = (a_qq - a_pp) / (2 a_pq)
//     t   = sign(tau) / (|tau| + sqrt(1 + tau^2))      (sign(0) = +1)
//     c   = 1 / sqrt(1 + t^2),   s = t c
// which is the rotation that zeroes a_pq. The same rotation formula serves the
// symmetric eigensolver (a_pp = M[p][p], ...) and the one-sided SVD steps
// (a_pp = alpha, a_qq = beta, a_pq = gamma). When |a_pq| <= EPS the step is
// skipped: c = 1, s = 0 and `skipped` is set.
//
// To keep full precision for both small and large tau, t is evaluated in the
// equivalent form t = sign(tau) * 2|a_pq| / (|d| + sqrt(d^2 + 4 a_pq^2)) with
// d = a_qq - a_pp, directly from the integer inputs. Datapath: one shared
// sequential divider (95-bit numerator) and one sequential 130-bit square
// root, each used twice per rotation; t, c and s are Q2.30. Latency is about
// 330 clocks; `done` pulses for one clock and c, s hold until the next `start`.
module jacobi_rot
  import stereo_pkg::*;
#(
  parameter acc_t EPS = 64'sd16   // "small" threshold on |a_pq|
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  acc_t a_pp,
  input  acc_t a_qq,
  input  acc_t a_pq,
  output logic busy,
  output logic done,
  output logic skipped,
  output un_t  c,
  output un_t  s
);
  typedef enum logic [2:0] { S_IDLE, S_SQ1, S_T, S_SQ2, S_C, S_S } st_t;
  st_t st;

  logic         dv_start, dv_done, dv_busy;
  logic [94:0]  dv_num, dv_quo;
  logic [65:0]  dv_den, dv_rem;
  logic         sq_start, sq_done, sq_busy;
  logic [129:0] sq_x;
  logic [64:0]  sq_root;

  udiv_seq #(.NW(95), .DW(66)) u_div (
    .clk, .rst_n, .start(dv_start), .num(dv_num), .den(dv_den),
    .busy(dv_busy), .done(dv_done), .quo(dv_quo), .rem(dv_rem));
  usqrt_seq #(.W(130)) u_sqrt (
    .clk, .rst_n, .start(sq_start), .x(sq_x),
    .busy(sq_busy), .done(sq_done), .root(sq_root));

  logic        neg;        // sign of tau, hence of t
  logic [64:0] d_m;        // |a_qq - a_pp|
  logic [63:0] q_m;        // |a_pq|
  logic [31:0] t_m;        // |t|, Q2.30
  logic [31:0] c_m;        // c, Q2.30
  logic [64:0] diff_abs;
  logic signed [64:0] diff;
  logic [63:0] apq_abs;
  logic [63:0] t_prod;

  assign diff     = 65'(a_qq) - 65'(a_pp);
  assign diff_abs = diff[64] ? 65'(-diff) : 65'(diff);
  assign apq_abs  = a_pq[63] ? 64'(-a_pq) : 64'(a_pq);
  assign t_prod   = 64'(t_m) * 64'(c_m);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; busy <= 1'b0; done <= 1'b0; skipped <= 1'b0;
      c <= UN_ONE; s <= '0; neg <= 1'b0; d_m <= '0; q_m <= '0; t_m <= '0; c_m <= '0;
      dv_start <= 1'b0; dv_num <= '0; dv_den <= '0;
      sq_start <= 1'b0; sq_x <= '0;
    end else begin
      done     <= 1'b0;
      dv_start <= 1'b0;
      sq_start <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          if (apq_abs <= 64'(EPS)) begin
            c <= UN_ONE; s <= '0; skipped <= 1'b1; done <= 1'b1;
          end else begin
            busy <= 1'b1; skipped <= 1'b0;
            neg  <= diff[64] ^ a_pq[63];
            d_m  <= diff_abs;
            q_m  <= apq_abs;
            // d^2 + 4 a_pq^2
            sq_x <= 130'(diff_abs) * 130'(diff_abs) + ((130'(apq_abs) * 130'(apq_abs)) << 2);
            sq_start <= 1'b1;
            st <= S_SQ1;
          end
        end
        S_SQ1: if (sq_done) begin
          dv_num <= 95'(q_m) << 31;             // 2|a_pq| in Q2.30 units
          dv_den <= 66'(d_m) + 66'(sq_root);
          dv_start <= 1'b1;
          st <= S_T;
        end
        S_T: if (dv_done) begin
          t_m  <= dv_quo[31:0];
          sq_x <= 130'(64'(dv_quo[31:0]) * 64'(dv_quo[31:0])) + (130'(1) << 60);
          sq_start <= 1'b1;
          st <= S_SQ2;
        end
        S_SQ2: if (sq_done) begin
          dv_num <= 95'(1) << 60;
          dv_den <= 66'(sq_root);
          dv_start <= 1'b1;
          st <= S_C;
        end
        S_C: if (dv_done) begin
          c_m <= dv_quo[31:0];
          st  <= S_S;
        end
        S_S: begin
          c    <= un_t'(c_m);
          s    <= neg ? -un_t'(t_prod[61:30]) : un_t'(t_prod[61:30]);
          busy <= 1'b0;
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
