// calib_log: memory of the normalized point pairs collected in calibration.
//
// Pairs are appended with `wr` (address = current count); `full` rises when
// DEPTH pairs are held, and further writes are ignored. The essential matrix
// estimator reads entries back through a synchronous read port (rd_data valid
// one clock after rd_addr). `last` is the most recently written pair, used by
// the chirality check. `clr` empties the log. Each entry holds four Q16.16
// coordinates (16 bytes); the depth is this implementation's choice within the
// design's "dozens of calibration pairs".
module calib_log
  import stereo_pkg::*;
#(
  parameter int DEPTH = 32
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clr,
  input  logic                        wr,
  input  pair_t                       wr_pair,
  input  logic [$clog2(DEPTH)-1:0]    rd_addr,
  output pair_t                       rd_data,
  output pair_t                       last,
  output logic [$clog2(DEPTH+1)-1:0]  count,
  output logic                        full
);
  localparam int AW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH + 1);

  pair_t mem [DEPTH];

  assign full = (count == CW'(DEPTH));

  always_ff @(posedge clk) begin
    if (wr && !full) mem[AW'(count)] <= wr_pair;
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      last  <= '0;
    end else if (clr) begin
      count <= '0;
    end else if (wr && !full) begin
      count <= count + 1'b1;
      last  <= wr_pair;
    end
  end
endmodule
