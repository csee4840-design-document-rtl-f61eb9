// tb_calib_log: self-checking test of the calibration-point log (32 pairs).
//
// Writes random pairs until the log is full and beyond, then reads every
// entry back. Checks count, full, `last`, that writes past full are ignored,
// the one-clock read latency, and that clr empties the log.
module tb_calib_log;
  import stereo_pkg::*;
  localparam int D = 32;
  logic clk = 0, rst_n = 1, clr = 0, wr = 0, full;
  initial #1 rst_n = 0;  // asynchronous reset edge ahead of the first clock
  pair_t wr_pair, rd_data, last;
  logic [$clog2(D)-1:0] rd_addr;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  pair_t ref_m [D];

  calib_log #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rd_addr = '0; wr_pair = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(count == 0 && !full, "not empty after reset");
    for (int k = 0; k < D + 3; k++) begin
      wr_pair = {$urandom, $urandom, $urandom, $urandom};
      if (k < D) ref_m[k] = wr_pair;
      wr = 1;
      @(negedge clk);
      wr = 0;
      if (k < D) check(last == ref_m[k], $sformatf("last after write %0d", k));
      check(count == 6'((k < D) ? k + 1 : D), $sformatf("count %0d after %0d writes", count, k + 1));
      check(full == (k >= D - 1), $sformatf("full after %0d writes", k + 1));
    end
    check(last == ref_m[D-1], "write past full changed last");
    for (int k = 0; k < D; k++) begin
      rd_addr = 5'(k);
      @(negedge clk);
      check(rd_data == ref_m[k], $sformatf("entry %0d", k));
    end
    clr = 1;
    @(negedge clk);
    clr = 0;
    check(count == 0 && !full, "clr did not empty the log");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
