// tb_ddr_reader: self-checking test of the Avalon-MM burst read master.
//
// The reader fetches whole frames from the behavioural DDR model (random
// waitrequest, latency and gaps) into a FIFO that is drained slowly at
// random, so the reader's flow control is exercised. Checks: every word
// arrives in order and equals the memory content at base + 8 * beat, the FIFO
// never overflows, each burst is at most BURST beats, `done` pulses once after
// the last beat, and a second frame from another base works too. A small
// frame (64x8) keeps the run short.
module tb_ddr_reader;
  localparam int W = 64, H = 8, NB = W * H / 8, BURST = 16, DEPTH = 32;
  logic clk = 0, rst_n = 1, start = 0;
  initial #1 rst_n = 0;  // asynchronous reset edge ahead of the first clock
  logic [31:0] base_addr;
  logic [15:0] n_beats;
  logic [$clog2(DEPTH):0] fifo_count;
  logic busy, done;
  logic [31:0] avm_address;
  logic avm_read, avm_waitrequest, avm_readdatavalid;
  logic [$clog2(BURST):0] avm_burstcount;
  logic [63:0] avm_readdata;
  logic px_valid;
  logic [63:0] px_data;
  logic f_wready, f_rvalid, f_rready;
  logic [63:0] f_rdata;
  int checks = 0, failures = 0;

  ddr_reader #(.BURST(BURST), .FIFO_DEPTH(DEPTH)) dut (.*);
  ddr_model #(.IMG_W(W), .IMG_H(H), .BW($clog2(BURST) + 1)) ddr (.*);
  pixel_fifo #(.WIDTH(64), .DEPTH(DEPTH)) fifo (
    .clk, .rst_n, .clr(1'b0), .wr_valid(px_valid), .wr_ready(f_wready), .wr_data(px_data),
    .rd_valid(f_rvalid), .rd_ready(f_rready), .rd_data(f_rdata), .count(fifo_count));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int got = 0, done_count = 0, overflow = 0, bad_burst = 0, full_seen = 0;
  always_ff @(posedge clk) begin
    if (px_valid && !f_wready) overflow <= overflow + 1;
    if (avm_read && (avm_burstcount > BURST || avm_burstcount == 0)) bad_burst <= bad_burst + 1;
    if (done) done_count <= done_count + 1;
    if (fifo_count >= DEPTH - BURST) full_seen <= full_seen + 1;
  end

  assign f_rready = f_rvalid && ($urandom_range(99) < 30);   // slow consumer

  task automatic run_frame(input int b);
    int errors;
    base_addr = ddr.fb_base[b];
    n_beats = 16'(NB);
    got = 0; errors = 0; done_count = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (got < NB) begin
      @(posedge clk);
      if (f_rvalid && f_rready) begin
        if (f_rdata !== ddr.word_at(base_addr + 32'(8 * got))) errors++;
        got++;
      end
    end
    repeat (50) @(posedge clk);
    check(errors == 0, $sformatf("buffer %0d: %0d words wrong", b, errors));
    check(done_count == 1, $sformatf("buffer %0d: done pulsed %0d times", b, done_count));
    check(!busy, "reader still busy");
    check(fifo_count == 0, "extra words delivered");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_frame(1);
    run_frame(2);
    check(overflow == 0, $sformatf("FIFO overflowed %0d times", overflow));
    check(bad_burst == 0, "illegal burstcount");
    check(ddr.stall_cycles > 0, "waitrequest never stalled the reader");
    check(full_seen > 0, "flow control never limited by FIFO space");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
