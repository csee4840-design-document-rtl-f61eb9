// tb_pixel_fifo: self-checking test of the pixel FIFO at its full 64 x 512 size.
//
// Random writes and reads against a reference queue. Checks every word read
// in order, `count`, full (wr_ready low exactly at 512 entries) and empty
// (rd_valid low at 0), and that `clr` empties the FIFO.
module tb_pixel_fifo;
  localparam int DEPTH = 512;
  logic clk = 0, rst_n = 1, clr = 0;
  initial #1 rst_n = 0;  // asynchronous reset edge ahead of the first clock
  logic wr_valid, wr_ready, rd_valid, rd_ready;
  logic [63:0] wr_data, rd_data;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0;
  logic [63:0] ref_q [$];

  pixel_fifo #(.WIDTH(64), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int full_hits = 0, empty_hits = 0;
  task automatic phase(input int n, input int wp, input int rp);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      wr_valid = ($urandom_range(99) < wp);
      wr_data  = {$urandom, $urandom};
      rd_ready = ($urandom_range(99) < rp);
      wr_valid = wr_valid && wr_ready;      // never write when full
      rd_ready = rd_ready && rd_valid;      // never read when empty
      if (count != ref_q.size()) begin check(0, "count mismatch"); end
      if (ref_q.size() == DEPTH) begin full_hits++; check(!wr_ready, "not full at DEPTH"); end
      if (ref_q.size() == 0) begin empty_hits++; check(!rd_valid, "not empty at 0"); end
      if (rd_ready) check(rd_data == ref_q[0], "data mismatch");
      @(posedge clk);
      if (rd_ready) void'(ref_q.pop_front());
      if (wr_valid) ref_q.push_back(wr_data);
    end
  endtask

  initial begin
    wr_valid = 0; rd_ready = 0; wr_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    phase(3000, 90, 20);     // fill up
    phase(3000, 20, 90);     // drain
    phase(3000, 50, 50);
    @(negedge clk); wr_valid = 0; rd_ready = 0; clr = 1;
    @(negedge clk); clr = 0; ref_q.delete();
    check(count == 0 && !rd_valid, "clr did not empty the FIFO");
    check(full_hits > 0, "FIFO never became full");
    check(empty_hits > 0, "FIFO never became empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
