// pixel_fifo: synchronous first-word-fall-through FIFO for 64-bit pixel beats.
//
// Sits between the DDR reader and the threshold/centroid stage. A beat is
// written when wr_valid && wr_ready and read when rd_valid && rd_ready;
// rd_data shows the oldest entry whenever rd_valid is high. `count` reports
// the occupancy so that the reader can avoid requesting more data than fits.
// `clr` empties the FIFO synchronously. Width and depth (64 x 512, 4 KiB)
// follow the design's on-chip memory budget; the FWFT handshake is this
// implementation's choice. The producer has no way to hold a beat back, so
// offering a beat while full is a protocol error, flagged by an assertion.
module pixel_fifo #(
  parameter int WIDTH = 64,
  parameter int DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     wr_valid,
  output logic                     wr_ready,
  input  logic [WIDTH-1:0]         wr_data,
  output logic                     rd_valid,
  input  logic                     rd_ready,
  output logic [WIDTH-1:0]         rd_data,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign wr_ready = (count != (AW+1)'(DEPTH));
  assign rd_valid = (count != 0);
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_valid && rd_ready;
  assign rd_data  = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0; rptr <= '0; count <= '0;
    end else if (clr) begin
      wptr <= '0; rptr <= '0; count <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH-1)) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_valid && !wr_ready && !clr));
  a_count_range:  assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
endmodule
