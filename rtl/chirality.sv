// chirality: selects the physically valid pose among four candidates.
//
// For each candidate c = 0..3 the matched calibration point (x1,y1) <-> (x2,y2)
// is triangulated with P1 = [I | 0] and P2 = [R_c | t_c] by a triangulate
// instance. With the homogeneous result (X, Y, Z, W) the point is in front of
// camera 1 when Z/W > 0 and in front of camera 2 when (R_c[2] . (X,Y,Z) +
// t_c[2] W) / W > 0; both tests are sign comparisons, so no division is
// needed. The first candidate passing both tests is chosen. If none does, the
// candidate with the most passing tests is taken and `ok` is low. The outputs
// are the index `sel` and the two projection matrices P1 = [I | 0] and
// P2 = [R | t] (Q2.30), built by concatenation, which the runtime
// triangulator uses. Testing a single matched point follows the design; the
// tie rule and the fallback when no candidate passes are this
// implementation's choices.
//
// Timing: four triangulations (a few thousand clocks each) plus 2 clocks per
// candidate. `done` pulses once; outputs hold until the next `start`.
module chirality
  import stereo_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  un_t  cand_r [4][3][3],
  input  un_t  cand_t [4][3],
  input  pt_t  x1,
  input  pt_t  y1,
  input  pt_t  x2,
  input  pt_t  y2,
  output logic busy,
  output logic done,
  output logic ok,
  output logic [1:0] sel,
  output un_t  p1 [3][4],
  output un_t  p2 [3][4]
);
  typedef enum logic [2:0] { S_IDLE, S_TRI, S_WAIT, S_EVAL, S_OUT } st_t;
  st_t st;

  logic [1:0] c;
  un_t  p1_id [3][4];
  un_t  p2_c  [3][4];
  always_comb begin
    for (int i = 0; i < 3; i++) begin
      for (int j = 0; j < 3; j++) begin
        p1_id[i][j] = (i == j) ? UN_ONE : '0;
        p2_c[i][j]  = cand_r[c][i][j];
      end
      p1_id[i][3] = '0;
      p2_c[i][3]  = cand_t[c][i];
    end
  end

  logic tri_start, tri_busy, tri_done;
  un_t  xh [4];
  pt_t  xyz [3];
  triangulate u_tri (
    .clk, .rst_n, .start(tri_start), .p1(p1_id), .p2(p2_c),
    .x1, .y1, .x2, .y2, .busy(tri_busy), .done(tri_done), .xh(xh), .xyz(xyz));

  // Depth signs of the current triangulated point.
  logic signed [63:0] z2;
  logic front1, front2;
  assign z2 = 64'(p2_c[2][0]) * 64'(xh[0]) + 64'(p2_c[2][1]) * 64'(xh[1])
            + 64'(p2_c[2][2]) * 64'(xh[2]) + 64'(p2_c[2][3]) * 64'(xh[3]);
  assign front1 = (xh[2] != 0) && (xh[3] != 0) && (xh[2][31] == xh[3][31]);
  assign front2 = (z2 != 0) && (xh[3] != 0) && (z2[63] == xh[3][31]);

  logic [1:0] best_score;
  logic [1:0] best_c;
  logic       found;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; busy <= 1'b0; done <= 1'b0; ok <= 1'b0; sel <= '0;
      tri_start <= 1'b0; c <= '0; best_score <= '0; best_c <= '0; found <= 1'b0;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 4; j++) begin p1[i][j] <= '0; p2[i][j] <= '0; end
    end else begin
      done <= 1'b0;
      tri_start <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          busy <= 1'b1; c <= '0; best_score <= '0; best_c <= '0; found <= 1'b0;
          st <= S_TRI;
        end
        S_TRI: begin tri_start <= 1'b1; st <= S_WAIT; end
        S_WAIT: if (tri_done) st <= S_EVAL;
        S_EVAL: begin
          if (!found && (2'(front1) + 2'(front2) > best_score || c == 2'd0)) begin
            best_score <= 2'(front1) + 2'(front2);
            best_c <= c;
          end
          if (!found && front1 && front2) found <= 1'b1;
          if (c == 2'd3 || (!found && front1 && front2)) st <= S_OUT;
          else begin c <= c + 1'b1; st <= S_TRI; end
        end
        S_OUT: begin
          c <= best_c;          // p2_c now shows the chosen candidate
          st <= S_IDLE;
          busy <= 1'b0;
          done <= 1'b1;
          ok <= found;
          sel <= best_c;
          for (int i = 0; i < 3; i++)
            for (int j = 0; j < 4; j++) begin
              p1[i][j] <= p1_id[i][j];
              p2[i][j] <= (j == 3) ? cand_t[best_c][i] : cand_r[best_c][i][j];
            end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
