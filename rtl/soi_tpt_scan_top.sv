// soi_tpt_scan_top -- scan-based three-pattern delay-test harness for PD-SOI logic.
//
// In partially-depleted SOI a gate's delay depends on how long its inputs have
// been quiet: after a long static period one edge of a short pulse is fast and
// the return edge is slow ("pulse stretching"). To time a path at its worst,
// the test holds V1 long enough to precondition the path, applies V2 for at
// most one clock, and launches V3 = V1. This top places the two proposed ways
// of storing and applying such tests side by side, each with its own ports:
//
//   scheme 1 (s1_*): N_IN launch cells that are scan element 1 (two parallel
//                    scan paths A and B, six clocks), then N_OUT LSSD capture
//                    cells on scan path A.
//   scheme 2 (s2_*): N_IN launch cells that are scan element 2 (one scan path,
//                    two positions per launch cell, four clocks), then N_OUT
//                    LSSD capture cells.
//
// The combinational circuit under test sits outside, between *_launch_out
// (Data Out of the launch cells, the circuit's inputs) and *_capture_in (Data
// In of the capture cells, the circuit's outputs). *_sys_in are the launch
// cells' functional Data In and *_capture_out the capture cells' Data Out.
// LAUNCH_ENHANCED selects which launch cells get the larger element; the rest
// are plain LSSD cells (for inputs that source no tested path).
//
// Sizes are this implementation's choice: the defaults, 233 inputs and 140
// outputs, hold the largest benchmark circuit the evaluation used (c2670).
// Interface/timing: all clocks are non-overlapping, level-sensitive pulses
// from the tester; there is no reset, the registers are initialised by
// scanning. The tested interval is the rise of C2 to the fall of C1.
module soi_tpt_scan_top
  import tpt_scan_pkg::*;
#(
  parameter int unsigned      N_IN            = 233,
  parameter int unsigned      N_OUT           = 140,
  parameter logic [N_IN-1:0]  LAUNCH_ENHANCED = '1
) (
  // scheme 1
  input  se1_clk_t          s1_clk,
  input  logic [N_IN-1:0]   s1_sys_in,
  output logic [N_IN-1:0]   s1_launch_out,
  input  logic [N_OUT-1:0]  s1_capture_in,
  output logic [N_OUT-1:0]  s1_capture_out,
  input  logic              s1_scan_in_a,
  output logic              s1_scan_out_a,
  input  logic              s1_scan_in_b,
  output logic              s1_scan_out_b,
  // scheme 2
  input  se2_clk_t          s2_clk,
  input  logic [N_IN-1:0]   s2_sys_in,
  output logic [N_IN-1:0]   s2_launch_out,
  input  logic [N_OUT-1:0]  s2_capture_in,
  output logic [N_OUT-1:0]  s2_capture_out,
  input  logic              s2_scan_in,
  output logic              s2_scan_out
);

  localparam int unsigned W = N_IN + N_OUT;
  // Capture cells (upper N_OUT positions) are always standard LSSD elements.
  localparam logic [W-1:0] ENH = {{N_OUT{1'b0}}, LAUNCH_ENHANCED};

  se1_scan_register #(.WIDTH(W), .ENHANCED(ENH)) u_scheme1 (
    .clk        (s1_clk),
    .data_in    ({s1_capture_in, s1_sys_in}),
    .data_out   ({s1_capture_out, s1_launch_out}),
    .scan_in_a  (s1_scan_in_a),
    .scan_out_a (s1_scan_out_a),
    .scan_in_b  (s1_scan_in_b),
    .scan_out_b (s1_scan_out_b)
  );

  se2_scan_register #(.WIDTH(W), .ENHANCED(ENH)) u_scheme2 (
    .clk      (s2_clk),
    .data_in  ({s2_capture_in, s2_sys_in}),
    .data_out ({s2_capture_out, s2_launch_out}),
    .scan_in  (s2_scan_in),
    .scan_out (s2_scan_out)
  );

endmodule
