// ddr_model: behavioural model of the HPS DDR seen through an Avalon-MM
// burst read slave (64-bit data). Not synthesizable; testbench use only.
//
// Holds four grayscale frame buffers (640x480 by default) at base addresses
// fb_base[0..3], generated on the fly instead of stored: each buffer shows
// one bright rectangular beacon blob (value 220) on a dim textured background
// (values 0..59, a hash of the address). Other addresses read a pattern
// derived from the address. Reads are accepted when waitrequest is low;
// waitrequest is raised at random (WAIT_PCT percent of cycles). Accepted
// bursts are queued and their beats returned in order, one per clock at most,
// after a random latency of LAT_MIN..LAT_MAX clocks and with random gaps.
// Counters report stall cycles and bursts served.
module ddr_model #(
  parameter int IMG_W    = 640,
  parameter int IMG_H    = 480,
  parameter int BW       = 5,
  parameter int WAIT_PCT = 20,
  parameter int LAT_MIN  = 4,
  parameter int LAT_MAX  = 24,
  parameter int GAP_PCT  = 10
) (
  input  logic          clk,
  input  logic [31:0]   avm_address,
  input  logic          avm_read,
  input  logic [BW-1:0] avm_burstcount,
  output logic          avm_waitrequest,
  output logic [63:0]   avm_readdata,
  output logic          avm_readdatavalid
);
  logic [31:0] fb_base [4];
  int blob_x0 [4], blob_x1 [4], blob_y0 [4], blob_y1 [4];
  int stall_cycles = 0;
  int bursts = 0;
  longint cycle = 0;

  typedef struct { logic [31:0] addr; int left; longint ready; } burst_t;
  burst_t q [$];

  initial begin
    avm_waitrequest = 1'b0;
    avm_readdata = '0;
    avm_readdatavalid = 1'b0;
    for (int b = 0; b < 4; b++) begin
      fb_base[b] = 32'h1000_0000 + 32'(b) * 32'h0010_0000;
      blob_x0[b] = 100; blob_x1[b] = 103; blob_y0[b] = 100; blob_y1[b] = 103;
    end
  end

  function automatic logic [7:0] pixel(input int b, input int x, input int y);
    if (x >= blob_x0[b] && x <= blob_x1[b] && y >= blob_y0[b] && y <= blob_y1[b]) return 8'd220;
    return 8'((x * 7 + y * 13 + (x ^ y)) % 60);
  endfunction

  function automatic logic [63:0] word_at(input logic [31:0] addr);
    logic [63:0] w;
    for (int b = 0; b < 4; b++)
      if (addr >= fb_base[b] && addr < fb_base[b] + 32'(IMG_W * IMG_H)) begin
        int ofs;
        ofs = int'(addr - fb_base[b]);
        for (int i = 0; i < 8; i++)
          w[8*i +: 8] = pixel(b, (ofs + i) % IMG_W, (ofs + i) / IMG_W);
        return w;
      end
    return {addr, ~addr};
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (avm_read && avm_waitrequest) stall_cycles <= stall_cycles + 1;
    if (avm_read && !avm_waitrequest) begin
      burst_t nb;
      nb.addr  = avm_address;
      nb.left  = int'(avm_burstcount);
      nb.ready = cycle + longint'($urandom_range(LAT_MAX, LAT_MIN));
      q.push_back(nb);
      bursts <= bursts + 1;
    end
    avm_waitrequest <= ($urandom_range(99) < WAIT_PCT);
    avm_readdatavalid <= 1'b0;
    if (q.size() > 0 && q[0].ready <= cycle && $urandom_range(99) >= GAP_PCT) begin
      avm_readdata <= word_at(q[0].addr);
      avm_readdatavalid <= 1'b1;
      q[0].addr = q[0].addr + 8;
      q[0].left = q[0].left - 1;
      if (q[0].left == 0) void'(q.pop_front());
    end
  end
endmodule
