// usqrt_seq: unsigned sequential integer square root, one root bit per clock.
//
// Pulse `start` with a W-bit radicand `x`; W/2+1 clocks later `done` pulses
// and `root` holds floor(sqrt(x)). Digit-by-digit (non-restoring) method.
// Used by the Jacobi rotation to form sqrt(1+tau^2) and sqrt(1+t^2).
module usqrt_seq #(
  parameter int W = 64     // radicand width, even
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   x,
  output logic           busy,
  output logic           done,
  output logic [W/2-1:0] root
);
  logic [W-1:0]            xr;
  logic [W/2:0]            rem;
  logic [$clog2(W)-1:0]    cnt;
  logic [W/2+2:0]          trial;
  logic [W/2+2:0]          rem_sh;

  assign rem_sh = {rem, xr[W-1:W-2]};
  assign trial  = {1'b0, root, 2'b01};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      root <= '0;
      xr   <= '0;
      rem  <= '0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        xr   <= x;
        rem  <= '0;
        root <= '0;
        cnt  <= $clog2(W)'(W/2);
      end else if (busy) begin
        if (cnt == 0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          xr  <= xr << 2;
          cnt <= cnt - 1'b1;
          if (rem_sh >= trial) begin
            rem  <= (W/2+1)'(rem_sh - trial);
            root <= {root[W/2-2:0], 1'b1};
          end else begin
            rem  <= rem_sh[W/2:0];
            root <= {root[W/2-2:0], 1'b0};
          end
        end
      end
    end
  end
endmodule
