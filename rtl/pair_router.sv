// pair_router: the mode multiplexer in front of the two geometry paths.
//
// Each normalized centroid pair arriving with in_valid is steered, according
// to MODE.calibration_mode, either to the calibration path (cal_valid: the
// pair is logged for pose estimation) or to the runtime path (run_valid: the
// pair is triangulated). In runtime mode a pair is only forwarded when valid
// projection matrices exist (`calibrated`); otherwise it is dropped and
// `dropped` pulses. The pair itself is passed to both outputs; the valid
// strobes select the consumer. Combinational, no latency. The steering by mode
// follows the design's block diagram; dropping uncalibrated runtime pairs is
// this implementation's choice.
module pair_router
  import stereo_pkg::*;
(
  input  logic  in_valid,
  input  pair_t in_pair,
  input  logic  calibration_mode,
  input  logic  calibrated,
  output logic  cal_valid,
  output logic  run_valid,
  output logic  dropped,
  output pair_t out_pair
);
  assign cal_valid = in_valid && calibration_mode;
  assign run_valid = in_valid && !calibration_mode && calibrated;
  assign dropped   = in_valid && !calibration_mode && !calibrated;
  assign out_pair  = in_pair;
endmodule
