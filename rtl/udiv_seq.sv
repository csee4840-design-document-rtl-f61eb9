// udiv_seq: unsigned sequential restoring divider, one quotient bit per clock.
//
// Pulse `start` with `num` and `den`; NW+1 clocks later `done` pulses for one
// clock and `quo` holds num / den (truncated), `rem` the remainder. A zero
// divisor gives an all-ones quotient. Inputs are sampled on `start`; outputs
// hold until the next `start`. A helper shared by the centroid, the Jacobi
// rotation and the dehomogenizing step of triangulation.
module udiv_seq #(
  parameter int NW = 32,   // numerator and quotient width
  parameter int DW = 32    // divisor width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quo,
  output logic [DW-1:0] rem
);
  logic [NW-1:0]            n_sh;
  logic [DW-1:0]            d_r;
  logic [DW-1:0]            r;
  logic [$clog2(NW+1)-1:0]  cnt;
  logic [DW:0]              r_try;

  assign r_try = {r, n_sh[NW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      quo  <= '0;
      rem  <= '0;
      n_sh <= '0;
      d_r  <= '0;
      r    <= '0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        n_sh <= num;
        d_r  <= den;
        r    <= '0;
        quo  <= '0;
        cnt  <= $clog2(NW+1)'(NW);
      end else if (busy) begin
        if (cnt == 0) begin
          busy <= 1'b0;
          done <= 1'b1;
          rem  <= r;
        end else begin
          n_sh <= n_sh << 1;
          cnt  <= cnt - 1'b1;
          if (r_try >= {1'b0, d_r}) begin
            r   <= DW'(r_try - {1'b0, d_r});
            quo <= {quo[NW-2:0], 1'b1};
          end else begin
            r   <= r_try[DW-1:0];
            quo <= {quo[NW-2:0], 1'b0};
          end
        end
      end
    end
  end
endmodule
