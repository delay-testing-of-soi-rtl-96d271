// tb_soi_tpt_scan_top -- end-to-end three-pattern delay test of both schemes.
//
// The top is built with 4 launch cells (cell 2 left as a plain LSSD element)
// and 4 capture cells. Between them sits a behavioural PD-SOI circuit: capture
// input j is launch output j through a soi_path_model, whose return edge after
// preconditioning is slow (worst case) and all other edges fast.
//
// For each scheme and for both preconditioning levels p the testbench
//   1. three-pattern test, tight window: scans V1 = p, V2 = ~p, waits PRECOND,
//      pulses C3 (V2), waits one clock, launches V3 with C2 and captures with
//      C1 a window after C2 rises that lies between the fast and worst-case
//      delay of that edge. The enhanced launch paths must be caught as slow
//      (the capture latch still holds V2); the plain LSSD launch cell holds p.
//   2. three-pattern test, relaxed window: every path must capture V3.
//   3. two-pattern test with the same tight window: the path is preconditioned
//      at ~p and C3 launches p directly -- the fast first edge -- so the path
//      passes. This is why the third pattern is needed.
// The captured words are scanned out and compared with values derived from
// the test vectors. It also runs system-mode cycles. Every mechanism (both
// scan paths of scheme 1, the doubled scheme-2 path, V2 application, V3
// launch, capture, slow-path detection, fast two-pattern pass, system mode,
// the plain launch cell) is counted and must occur at least once.
module tb_soi_tpt_scan_top;
  timeunit 1ns; timeprecision 1ps;
  import tpt_scan_pkg::*;

  localparam int N_IN  = 4;
  localparam int N_OUT = 4;
  localparam logic [N_IN-1:0] ENH = 4'b1011;
  localparam int ROUNDS = 4;
`include "tb_soi_tpt_scan_body.svh"

  soi_tpt_scan_top #(.N_IN(N_IN), .N_OUT(N_OUT), .LAUNCH_ENHANCED(ENH)) dut (.*);

endmodule
