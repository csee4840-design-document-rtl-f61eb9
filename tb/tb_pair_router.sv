// tb_pair_router: exhaustive test of the mode multiplexer.
//
// Every combination of in_valid, calibration_mode and calibrated is applied
// with a random pair; the valid strobes must follow the routing table worked
// out here and the pair must pass unchanged.
module tb_pair_router;
  import stereo_pkg::*;
  logic in_valid, calibration_mode, calibrated, cal_valid, run_valid, dropped;
  pair_t in_pair, out_pair;
  int checks = 0, failures = 0;

  pair_router dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int rep = 0; rep < 4; rep++)
      for (int c = 0; c < 8; c++) begin
        {in_valid, calibration_mode, calibrated} = 3'(c);
        in_pair = {$urandom, $urandom, $urandom, $urandom};
        #1;
        check(cal_valid == (in_valid && calibration_mode), $sformatf("cal_valid case %0d", c));
        check(run_valid == (in_valid && !calibration_mode && calibrated), $sformatf("run_valid case %0d", c));
        check(dropped == (in_valid && !calibration_mode && !calibrated), $sformatf("dropped case %0d", c));
        check(out_pair == in_pair, "pair changed");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
