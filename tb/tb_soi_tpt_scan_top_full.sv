// tb_soi_tpt_scan_top_full -- the end-to-end test at the top's default size.
//
// Same test plan as tb_soi_tpt_scan_top (three-pattern tight and relaxed
// windows, two-pattern comparison, system mode, for both schemes and both
// preconditioning levels), run on the top with its default parameters:
// 233 launch cells, all enhanced, and 140 capture cells, the input and output
// counts of the c2670 benchmark. Capture cell j observes launch cell j.
module tb_soi_tpt_scan_top_full;
  timeunit 1ns; timeprecision 1ps;
  import tpt_scan_pkg::*;

  localparam int N_IN  = 233;
  localparam int N_OUT = 140;
  localparam logic [N_IN-1:0] ENH = '1;
  localparam int ROUNDS = 2;
`include "tb_soi_tpt_scan_body.svh"

  soi_tpt_scan_top dut (.*);

endmodule
