// ddr_reader: Avalon-MM burst read master that streams one frame from DDR.
//
// On `start` it reads n_beats 64-bit words from base_addr upwards,
//     avm_address = base_addr + 8 * beat,
// in bursts of up to BURST beats. A burst is only requested when the FIFO it
// feeds has room for it together with every beat already requested but not
// yet returned (fifo_count + in_flight + burst <= FIFO_DEPTH), so returning
// data is never dropped and no back-pressure on readdatavalid is needed.
// Returned words go straight to the FIFO (px_valid / px_data). `done` pulses
// when the last beat has arrived. Avalon-MM rules followed: address, read and
// burstcount are held while waitrequest is high (checked by assertions). The
// address rule and the 32-bit address / 64-bit data widths are the design's;
// the burst length and flow-control scheme are this implementation's choices.
module ddr_reader #(
  parameter int BURST      = 16,
  parameter int FIFO_DEPTH = 512,
  parameter int BEAT_W     = 16     // width of the beat counter
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [31:0]                 base_addr,
  input  logic [BEAT_W-1:0]           n_beats,
  input  logic [$clog2(FIFO_DEPTH):0] fifo_count,
  output logic                        busy,
  output logic                        done,
  // Avalon-MM master
  output logic [31:0]                 avm_address,
  output logic                        avm_read,
  output logic [$clog2(BURST):0]      avm_burstcount,
  input  logic                        avm_waitrequest,
  input  logic [63:0]                 avm_readdata,
  input  logic                        avm_readdatavalid,
  // to the FIFO
  output logic                        px_valid,
  output logic [63:0]                 px_data
);
  localparam int BCW = $clog2(BURST) + 1;
  localparam int FCW = $clog2(FIFO_DEPTH) + 1;

  logic [BEAT_W-1:0] to_request;   // beats not yet requested
  logic [BEAT_W-1:0] to_receive;   // beats not yet returned
  logic [FCW:0]      in_flight;
  logic [BCW-1:0]    next_len;
  logic              accepted;

  assign next_len = (to_request < BEAT_W'(BURST)) ? BCW'(to_request) : BCW'(BURST);
  assign accepted = avm_read && !avm_waitrequest;
  assign px_valid = avm_readdatavalid && busy;
  assign px_data  = avm_readdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0;
      avm_address <= '0; avm_read <= 1'b0; avm_burstcount <= '0;
      to_request <= '0; to_receive <= '0; in_flight <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        avm_address <= base_addr;
        avm_read <= 1'b0;
        to_request <= n_beats;
        to_receive <= n_beats;
        in_flight <= '0;
      end else if (busy) begin
        // request side
        if (accepted) begin
          avm_read <= 1'b0;
          avm_address <= avm_address + 32'({avm_burstcount, 3'b000});
        end else if (!avm_read && to_request != 0 &&
                     (FCW+1)'(fifo_count) + in_flight + (FCW+1)'(next_len) <= (FCW+1)'(FIFO_DEPTH)) begin
          avm_read <= 1'b1;
          avm_burstcount <= next_len;
        end
        // bookkeeping
        if (!accepted && !avm_read && to_request != 0 &&
            (FCW+1)'(fifo_count) + in_flight + (FCW+1)'(next_len) <= (FCW+1)'(FIFO_DEPTH)) begin
          to_request <= to_request - BEAT_W'(next_len);
          in_flight  <= in_flight + (FCW+1)'(next_len) - (FCW+1)'(avm_readdatavalid);
        end else begin
          in_flight  <= in_flight - (FCW+1)'(avm_readdatavalid);
        end
        if (avm_readdatavalid) begin
          to_receive <= to_receive - 1'b1;
          if (to_receive == 1) begin busy <= 1'b0; done <= 1'b1; end
        end
      end
    end
  end

  a_hold_addr: assert property (@(posedge clk) disable iff (!rst_n)
    avm_read && avm_waitrequest |=> avm_read && $stable(avm_address) && $stable(avm_burstcount));
  a_burst_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    avm_read |-> avm_burstcount != 0);
endmodule
